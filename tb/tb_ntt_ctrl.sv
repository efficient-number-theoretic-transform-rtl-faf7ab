// tb_ntt_ctrl: drives the controller with start/mode and answers each
// address-generator start with ag_done after a random delay. Checks the
// operation order INPUT -> NTT|INTT -> OUTPUT, one ag_start per phase, busy,
// the done pulse, that a start while busy is ignored, and that mode is
// latched at start.
module tb_ntt_ctrl;
  import ntt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, mode, ag_done, ag_start, busy, done;
  op_e  ag_op;

  ntt_ctrl dut (.*);
  always #5 clk = ~clk;

  op_e seen [$];
  int  done_cnt = 0;

  // model of the address generator: done some cycles after each start
  initial begin
    ag_done = 0;
    forever begin
      @(posedge clk);
      if (ag_start) begin
        seen.push_back(ag_op);
        repeat ($urandom % 20 + 1) @(posedge clk);
        #1 ag_done = 1;
        @(posedge clk);
        #1 ag_done = 0;
      end
    end
  end
  always @(posedge clk) if (done) done_cnt++;

  function automatic void chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endfunction

  task automatic one_op(input bit m);
    int dc = done_cnt;
    seen.delete();
    @(negedge clk);
    chk(!busy, "idle before start");
    start = 1; mode = m;
    @(negedge clk);
    start = 0; mode = !m;       // mode must have been latched
    chk(busy, "busy after start");
    repeat (5) @(negedge clk);
    start = 1;                  // ignored while busy
    @(negedge clk);
    start = 0;
    while (done_cnt == dc) @(negedge clk);
    chk(seen.size() == 3, $sformatf("three phases, got %0d", seen.size()));
    if (seen.size() == 3) begin
      chk(seen[0] == OP_INPUT, "phase 1 is input");
      chk(seen[1] == (m ? OP_INTT : OP_NTT), "phase 2 follows mode");
      chk(seen[2] == OP_OUTPUT, "phase 3 is output");
    end
    @(negedge clk);
    chk(!busy && done_cnt == dc + 1, "idle after done, one done pulse");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; mode = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20; i++) one_op(1'(i % 3 == 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
