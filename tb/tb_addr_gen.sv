// tb_addr_gen: runs the address generator through an input load with random
// gaps in `advance`, then NTT, INTT and output sequences. A monitor samples
// the outputs every cycle and checks them against the Kyber reference loop
// order computed here: read addresses land in the RAM given by address
// parity, swap bits and twiddle addresses follow one cycle later with the
// data, every butterfly's write-back addresses equal its read addresses and
// come exactly 9 cycles after its data, input writes follow each accepted
// word by one cycle in order 0..255, and op_done marks the last write or
// output word at the expected cycle.
module tb_addr_gen;
  import ntt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start, advance;
  op_e  op;
  logic busy, in_ready;
  logic [7:0] ra_raddr1, ra_raddr2, rb_raddr1, rb_raddr2, tw_addr1, tw_addr2;
  logic rd_bu_valid, rd_bu_mode, rd_swap1, rd_swap2, rd_out_valid, rd_out_sel;
  logic we, wr_from_input, wr_swap1, wr_swap2;
  logic [7:0] ra_waddr1, ra_waddr2, rb_waddr1, rb_waddr2;
  logic op_done;

  addr_gen dut (.*);
  always #5 clk = ~clk;

  typedef struct { int a; int b; int k; } bf_t;
  bf_t bfs [$];
  int  cyc = 0;
  int  step_cnt, wr_cnt, in_wr_cnt, out_cnt, done_cyc, start_cyc;
  op_e cur_op;
  int  prev_addr [4];
  int  prev_tw [2];
  int  pend_cyc [$];
  int  pend_step [$];
  int  adv_q [$];

  function automatic void chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL cycle %0d: %s", cyc, msg);
    end
  endfunction

  function automatic bit par(input int x);
    return ^8'(x);
  endfunction

  // monitor
  always @(negedge clk) if (rst_n) begin
    cyc++;
    if (rd_bu_valid) begin
      bf_t b1, b2;
      b1 = bfs[2*step_cnt]; b2 = bfs[2*step_cnt+1];
      chk(rd_bu_mode == (cur_op == OP_INTT), "butterfly mode");
      chk(rd_swap1 == par(b1.a) && rd_swap2 == par(b2.a), "read swap bits");
      chk(prev_addr[0] == (par(b1.a) ? b1.b : b1.a) && prev_addr[1] == (par(b1.a) ? b1.a : b1.b),
          $sformatf("unit 1 read addresses step %0d", step_cnt));
      chk(prev_addr[2] == (par(b2.a) ? b2.b : b2.a) && prev_addr[3] == (par(b2.a) ? b2.a : b2.b),
          $sformatf("unit 2 read addresses step %0d", step_cnt));
      chk(prev_tw[0] == ((cur_op == OP_INTT) ? 128 : 0) + b1.k &&
          prev_tw[1] == ((cur_op == OP_INTT) ? 128 : 0) + b2.k, "twiddle addresses");
      pend_cyc.push_back(cyc + BU_LATENCY);
      pend_step.push_back(step_cnt);
      step_cnt++;
    end
    if (we && !wr_from_input) begin
      int p [2];
      bf_t b1, b2;
      p[0] = pend_cyc.pop_front();
      p[1] = pend_step.pop_front();
      b1 = bfs[2*p[1]]; b2 = bfs[2*p[1]+1];
      chk(p[0] == cyc, $sformatf("write-back 9 cycles after butterfly data (expected cycle %0d, step %0d)", p[0], p[1]));
      chk(wr_swap1 == par(b1.a) && wr_swap2 == par(b2.a), "write swap bits");
      chk(int'(ra_waddr1) == (par(b1.a) ? b1.b : b1.a) && int'(rb_waddr1) == (par(b1.a) ? b1.a : b1.b) &&
          int'(ra_waddr2) == (par(b2.a) ? b2.b : b2.a) && int'(rb_waddr2) == (par(b2.a) ? b2.a : b2.b),
          "write-back addresses");
      wr_cnt++;
    end
    if (we && wr_from_input) begin
      chk(adv_q.size() > 0 && adv_q.pop_front() == cyc - 1, "input write one cycle after accept");
      chk(int'(ra_waddr1) == in_wr_cnt && int'(rb_waddr1) == in_wr_cnt, "input address order");
      in_wr_cnt++;
    end
    if (rd_out_valid) begin
      chk(rd_out_sel == par(out_cnt), "output bank select");
      chk((par(out_cnt) ? prev_addr[1] : prev_addr[0]) == out_cnt, "output read address");
      out_cnt++;
    end
    if (op_done) done_cyc = cyc;
    if (advance && in_ready) adv_q.push_back(cyc);
    prev_addr = '{int'(ra_raddr1), int'(rb_raddr1), int'(ra_raddr2), int'(rb_raddr2)};
    prev_tw   = '{int'(tw_addr1), int'(tw_addr2)};
  end

  task automatic run(input op_e o, input bit gaps);
    int k;
    bfs.delete();
    if (o == OP_NTT) begin
      k = 1;
      for (int len = 128; len >= 2; len >>= 1)
        for (int s = 0; s < 256; s += 2 * len) begin
          for (int j = s; j < s + len; j++) bfs.push_back('{j, j + len, k});
          k++;
        end
    end else if (o == OP_INTT) begin
      k = 127;
      for (int len = 2; len <= 128; len <<= 1)
        for (int s = 0; s < 256; s += 2 * len) begin
          for (int j = s; j < s + len; j++) bfs.push_back('{j, j + len, k});
          k--;
        end
    end
    cur_op = o; step_cnt = 0; wr_cnt = 0; in_wr_cnt = 0; out_cnt = 0; done_cyc = -1;
    @(posedge clk); #1;
    start = 1; op = o; start_cyc = cyc + 1;
    @(posedge clk); #1;
    start = 0;
    while (done_cyc < 0) begin
      advance = gaps ? 1'($urandom % 3 != 0) : 1'b1;
      @(posedge clk); #1;
    end
    advance = 0;
    repeat (3) @(posedge clk);
    #1;
    chk(!busy, "idle after operation");
    case (o)
      OP_NTT, OP_INTT: begin
        chk(step_cnt == 448 && wr_cnt == 448, $sformatf("448 steps, got %0d/%0d", step_cnt, wr_cnt));
        chk(done_cyc - start_cyc == 448 + 11,
            $sformatf("NTT/INTT op_done after %0d cycles, expected 459", done_cyc - start_cyc));
      end
      OP_INPUT:  chk(in_wr_cnt == 256, "256 input writes");
      OP_OUTPUT: begin
        chk(out_cnt == 256, "256 output reads");
        chk(done_cyc - start_cyc == 256 + 2, "output op_done time");
      end
    endcase
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; advance = 0; op = OP_INPUT;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(OP_INPUT, 1);
    run(OP_NTT, 0);
    run(OP_INTT, 0);
    run(OP_OUTPUT, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
