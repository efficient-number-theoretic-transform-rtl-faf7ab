// tb_ntt_accel: end-to-end test of the accelerator at its default size
// (n = 256, q = 3329, two butterfly units), against the plain-arithmetic
// Kyber reference model in tb_ref_pkg. Operations:
//   1. NTT of the unit polynomial and of random reduced polynomials;
//   2. INTT of random polynomials with unreduced 16-bit coefficients, fed
//      with random gaps in din_valid (input stalls);
//   3. round trip: the NTT output fed back through an INTT gives the input;
//   4. start pulses while busy (must be ignored) and an operation started
//      the cycle after the previous one's done (back-to-back).
// Every output word is compared with the model; the cycle count from start
// to done must be 978 plus the number of stalled input cycles (256 + 2 to
// load, 448 + 11 to transform, 256 + 3 to unload, plus state changes).
// Each mechanism is counted and must occur at least once.
module tb_ntt_accel;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, mode, din_valid, din_ready, dout_valid, busy, done;
  logic [15:0] din, dout;

  ntt_accel dut (.*);
  always #5 clk = ~clk;

  int n_ntt = 0, n_intt = 0, n_stall = 0, n_unreduced = 0, n_ignored = 0, n_b2b = 0;

  function automatic void chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endfunction

  // run one operation; the start pulse is applied at the current negedge
  task automatic run_op(input bit m, input poly_t x, input bit gaps, input bit poke,
                        output poly_t y);
    int idx = 0, oidx = 0, cyc = 0, stalls = 0;
    poly_t exp_y;
    exp_y = m ? intt(x) : ntt(x);
    start = 1; mode = m; din_valid = 0;
    for (int i = 0; i < 256; i++) if (x[i] >= QQ) n_unreduced++;
    forever begin
      @(negedge clk);
      cyc++;
      start = 0;
      if (poke && cyc == 300) begin
        start = 1; mode = !m; n_ignored++;
      end
      if (idx < 256) begin
        din = 16'(x[idx]);
        din_valid = gaps ? 1'($urandom % 4 != 0) : 1'b1;
        if (din_ready && !din_valid) begin stalls++; n_stall++; end
        if (din_ready && din_valid) idx++;
      end else din_valid = 0;
      if (dout_valid) begin
        if (oidx < 256) begin
          y[oidx] = int'(dout);
          checks++;
          if (int'(dout) != exp_y[oidx]) begin
            failures++;
            if (failures < 10)
              $display("FAIL: mode %0d coefficient %0d = %0d, expected %0d", m, oidx, dout, exp_y[oidx]);
          end
        end
        oidx++;
      end
      if (done) break;
      if (cyc > 5000) break;
    end
    chk(oidx == 256, $sformatf("256 outputs, got %0d", oidx));
    chk(cyc == 978 + stalls, $sformatf("start-to-done %0d cycles, expected %0d", cyc, 978 + stalls));
    if (m) n_intt++; else n_ntt++;
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_t a, b, c;
    start = 0; mode = 0; din_valid = 0; din = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. unit polynomial: every NTT output pair is (1, 0)
    for (int i = 0; i < 256; i++) a[i] = (i == 0);
    run_op(0, a, 0, 0, b);
    for (int i = 0; i < 256; i++) chk(b[i] == ((i % 2) == 0), "NTT of 1");
    // 2. random NTT, start poked while busy
    for (int i = 0; i < 256; i++) a[i] = int'($urandom % QQ);
    @(negedge clk);
    run_op(0, a, 0, 1, b);
    // 3. round trip, started the cycle after done (back-to-back)
    run_op(1, b, 0, 0, c);
    n_b2b++;
    for (int i = 0; i < 256; i++) chk(c[i] == a[i], "INTT(NTT(a)) = a");
    // 4. INTT of unreduced words with input stalls
    for (int i = 0; i < 256; i++) a[i] = int'($urandom % 65536);
    run_op(1, a, 1, 0, b);
    n_b2b++;
    // 5. NTT of unreduced words with stalls, then round trip back
    for (int i = 0; i < 256; i++) a[i] = int'($urandom % 65536);
    repeat (4) @(negedge clk);
    run_op(0, a, 1, 0, b);
    run_op(1, b, 1, 0, c);
    for (int i = 0; i < 256; i++) chk(c[i] == md(a[i]), "INTT(NTT(a)) = a mod q");
    chk(n_ntt > 0, "NTT mode exercised");
    chk(n_intt > 0, "INTT mode exercised");
    chk(n_stall > 0, "input stall exercised");
    chk(n_unreduced > 0, "unreduced input exercised");
    chk(n_ignored > 0, "start while busy exercised");
    chk(n_b2b > 0, "back-to-back operation exercised");
    $display("mechanisms: ntt=%0d intt=%0d stall_cycles=%0d unreduced=%0d ignored_start=%0d back_to_back=%0d",
             n_ntt, n_intt, n_stall, n_unreduced, n_ignored, n_b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
