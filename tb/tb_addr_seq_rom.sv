// tb_addr_seq_rom: replays the Kyber reference NTT and INTT loops and checks
// that the table lists their butterflies in order, two per word (unit 1 gets
// the even-numbered butterfly), with addresses (j, j + len) and twiddle
// index k; and that the input and output sequences are 0..255.
module tb_addr_seq_rom;
  import ntt_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [10:0] addr;
  seq_entry_t  data;

  addr_seq_rom dut (.clk, .addr, .data);
  always #5 clk = ~clk;

  typedef struct { int a; int b; int k; } bf_t;

  task automatic read(input int op, input int idx, output seq_entry_t e);
    @(negedge clk);
    addr = 11'(op * 512 + idx);
    @(negedge clk);
    e = data;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bf_t bfs [$];
    seq_entry_t e;
    for (int op = 0; op < 2; op++) begin
      int k;
      bfs.delete();
      if (op == 0) begin
        k = 1;
        for (int len = 128; len >= 2; len >>= 1)
          for (int s = 0; s < 256; s += 2 * len) begin
            for (int j = s; j < s + len; j++) bfs.push_back('{j, j + len, k});
            k++;
          end
      end else begin
        k = 127;
        for (int len = 2; len <= 128; len <<= 1)
          for (int s = 0; s < 256; s += 2 * len) begin
            for (int j = s; j < s + len; j++) bfs.push_back('{j, j + len, k});
            k--;
          end
      end
      for (int i = 0; i < 448; i++) begin
        read(op, i, e);
        checks++;
        if (int'(e.a1) != bfs[2*i].a   || int'(e.b1) != bfs[2*i].b   || int'(e.k1) != bfs[2*i].k ||
            int'(e.a2) != bfs[2*i+1].a || int'(e.b2) != bfs[2*i+1].b || int'(e.k2) != bfs[2*i+1].k) begin
          failures++;
          $display("FAIL op %0d step %0d: %p", op, i, e);
        end
      end
    end
    for (int op = 2; op < 4; op++)
      for (int i = 0; i < 256; i++) begin
        read(op, i, e);
        checks++;
        if (int'(e.a1) != i) begin
          failures++;
          $display("FAIL op %0d step %0d: %0d", op, i, e.a1);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
