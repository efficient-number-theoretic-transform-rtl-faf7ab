// tb_ntt_io: checks the input handshake (accept only with valid and ready,
// word registered one cycle later) and the output select/register (bank
// chosen by out_sel, dout_valid one cycle after out_valid).
module tb_ntt_io;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [15:0] din, din_q, ra_rdata, rb_rdata, dout;
  logic din_valid, din_ready, accept, out_valid, out_sel, dout_valid;

  ntt_io dut (.*);
  always #5 clk = ~clk;

  function automatic void chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] last_acc, exp_out;
    bit acc, ov;
    din_valid = 0; din_ready = 0; out_valid = 0; out_sel = 0;
    din = 0; ra_rdata = 0; rb_rdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    last_acc = 16'hdead;
    din = last_acc; din_valid = 1; din_ready = 1;
    @(negedge clk);
    for (int i = 0; i < 5000; i++) begin
      din = 16'($urandom); din_valid = 1'($urandom); din_ready = 1'($urandom);
      ra_rdata = 16'($urandom); rb_rdata = 16'($urandom);
      out_valid = 1'($urandom); out_sel = 1'($urandom);
      #1;
      chk(accept == (din_valid && din_ready), "accept");
      acc = accept; ov = out_valid;
      exp_out = out_sel ? rb_rdata : ra_rdata;
      @(negedge clk);
      if (acc) last_acc = din;
      chk(din_q == last_acc, "registered input word");
      chk(dout_valid == ov, "dout_valid one cycle after out_valid");
      if (ov) chk(dout == exp_out, "output bank select");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
