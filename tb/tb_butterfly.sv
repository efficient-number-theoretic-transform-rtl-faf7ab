// tb_butterfly: streams random butterflies, one per cycle, mixing CT and GS
// modes and unreduced 16-bit inputs. With t = w * 169 mod q the effective
// twiddle, it expects, exactly 9 cycles later with out_valid:
//   CT: c = a + t*b, d = a - t*b          GS: c = (a + b)/2, d = (a - b)*t
// (all mod 3329). Gaps in in_valid check that out_valid follows them.
module tb_butterfly;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid, mode, out_valid;
  logic [15:0] a, b, c, d;
  logic signed [15:0] w;

  typedef struct { bit v; int c; int d; } exp_t;
  exp_t exp_q [$];

  butterfly dut (.clk, .rst_n, .in_valid, .mode, .a, .b, .w, .out_valid, .c, .d);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ai, bi, wi, t, n_ct = 0, n_gs = 0;
    exp_t e;
    in_valid = 0; mode = 0; a = 0; b = 0; w = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 20000 + 9; i++) begin
      @(negedge clk);
      if (i >= 9) begin
        e = exp_q.pop_front();
        checks++;
        if (out_valid !== e.v) begin
          failures++;
          $display("FAIL step %0d: out_valid %b, expected %b", i, out_valid, e.v);
        end
        if (e.v) begin
          checks++;
          if (int'(c) != e.c || int'(d) != e.d) begin
            failures++;
            $display("FAIL step %0d: c,d = %0d,%0d expected %0d,%0d", i, c, d, e.c, e.d);
          end
        end
      end
      ai = (i % 7 == 0) ? 65535 - int'($urandom % 8) : int'($urandom % 65536);
      bi = (i % 5 == 0) ? int'($urandom % 3329) : int'($urandom % 65536);
      wi = int'($urandom % 3329) - 1664;
      t  = md(longint'(wi) * 169);
      in_valid = ($urandom % 8) != 0 && i < 20000;
      mode = 1'($urandom);
      a = 16'(ai); b = 16'(bi); w = 16'(wi);
      e.v = in_valid;
      if (!mode) begin
        e.c = md(ai + longint'(t) * bi);
        e.d = md(ai - longint'(t) * bi);
        if (in_valid) n_ct++;
      end else begin
        e.c = md(longint'(ai + bi) * 1665);
        e.d = md(longint'(ai - bi) * t);
        if (in_valid) n_gs++;
      end
      exp_q.push_back(e);
    end
    if (n_ct == 0 || n_gs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
