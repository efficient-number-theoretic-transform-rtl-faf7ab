// tb_kyber_polymul: the accelerator's job inside Kyber. For each parameter
// set (Kyber512/768/1024: k = 2, 3, 4 polynomials per vector) it computes
// the inner product of two random polynomial vectors in Z_3329[x]/(x^256+1),
//   h = INTT( sum_i NTT(f_i) o NTT(g_i) ),
// with all 2k forward NTTs and the final INTT run on the accelerator, and the
// pairwise product "o" (Kyber's degree-1 base multiplication) done here.
// The result is compared with a schoolbook negacyclic product. Operations
// are issued back to back; the total cycle count is checked against
// (2k + 1) x 978. Inputs g_i are small values -2..2 given as 16-bit words
// taken modulo 2^16 (so -1 is 65535); the accelerator reads words as unsigned
// integers, so the reference product uses the same unsigned values. This
// exercises unreduced input words.
module tb_kyber_polymul;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, mode, din_valid, din_ready, dout_valid, busy, done;
  logic [15:0] din, dout;

  ntt_accel dut (.*);
  always #5 clk = ~clk;

  function automatic void chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endfunction

  // one accelerator operation; returns its cycle count
  task automatic accel(input bit m, input poly_t x, output poly_t y, output int cyc);
    int idx = 0, oidx = 0;
    cyc = 0;
    start = 1; mode = m; din_valid = 0;
    forever begin
      @(negedge clk);
      cyc++;
      start = 0;
      if (idx < 256) begin
        din = 16'(x[idx]); din_valid = 1;
        if (din_ready) idx++;
      end else din_valid = 0;
      if (dout_valid && oidx < 256) begin y[oidx] = int'(dout); oidx++; end
      if (done || cyc > 5000) break;
    end
  endtask

  function automatic poly_t schoolbook(input poly_t a, input poly_t b);
    poly_t r;
    longint acc [256];
    for (int i = 0; i < 256; i++) acc[i] = 0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        if (i + j < 256) acc[i + j] += longint'(md(a[i])) * md(b[j]);
        else             acc[i + j - 256] -= longint'(md(a[i])) * md(b[j]);
    for (int i = 0; i < 256; i++) r[i] = md(acc[i]);
    return r;
  endfunction

  // Kyber base multiplication in the NTT domain (plain arithmetic)
  function automatic poly_t basemul(input poly_t a, input poly_t b);
    poly_t r;
    int z;
    for (int i = 0; i < 64; i++)
      for (int h = 0; h < 2; h++) begin
        int p = 4 * i + 2 * h;
        z = (h == 0) ? kyber_zeta(64 + i) : md(-kyber_zeta(64 + i));
        r[p]     = md(longint'(a[p]) * b[p] + md(longint'(a[p+1]) * b[p+1]) * longint'(z));
        r[p + 1] = md(longint'(a[p]) * b[p+1] + longint'(a[p+1]) * b[p]);
      end
    return r;
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    poly_t f, g, fh, gh, acc_hat, h, ref_h, t;
    int cyc, total;
    start = 0; mode = 0; din_valid = 0; din = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 2; k <= 4; k++) begin
      for (int i = 0; i < 256; i++) begin acc_hat[i] = 0; ref_h[i] = 0; end
      total = 0;
      for (int v = 0; v < k; v++) begin
        for (int i = 0; i < 256; i++) begin
          f[i] = int'($urandom % QQ);
          g[i] = int'($urandom % 5) - 2;                 // eta = 2 style secret
        end
        for (int i = 0; i < 256; i++) g[i] = g[i] & 16'hffff; // 16-bit words
        accel(0, f, fh, cyc); total += cyc;
        accel(0, g, gh, cyc); total += cyc;
        chk(fh == ntt(f), "forward NTT of f");
        t = basemul(fh, gh);
        for (int i = 0; i < 256; i++) acc_hat[i] = md(acc_hat[i] + t[i]);
        t = schoolbook(f, g);
        for (int i = 0; i < 256; i++) ref_h[i] = md(ref_h[i] + t[i]);
      end
      accel(1, acc_hat, h, cyc); total += cyc;
      for (int i = 0; i < 256; i++)
        chk(h[i] == ref_h[i], $sformatf("k=%0d coefficient %0d: %0d, expected %0d", k, i, h[i], ref_h[i]));
      chk(total == (2 * k + 1) * 978, $sformatf("k=%0d: %0d cycles, expected %0d", k, total, (2 * k + 1) * 978));
      $display("Kyber k=%0d inner product: %0d accelerator cycles", k, total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
