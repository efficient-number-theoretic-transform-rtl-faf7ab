// tb_mod_mul: streams random (x, w) pairs, one per cycle, and checks that
// exactly 5 cycles later r = x * w * 169 mod 3329 (fully reduced).
module tb_mod_mul;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [15:0] x;
  logic signed [15:0] w;
  logic [15:0] r;
  int exp_q [$];

  mod_mul dut (.clk(clk), .x(x), .w(w), .r(r));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xi, wi, e;
    for (int i = 0; i < 20000 + 5; i++) begin
      @(negedge clk);
      if (i >= 5) begin
        e = exp_q.pop_front();
        checks++;
        if (int'(r) != e) begin
          failures++;
          $display("FAIL step %0d: r = %0d, expected %0d", i, r, e);
        end
      end
      if (i < 4) begin
        xi = (i < 2) ? 3328 : 0; wi = (i % 2) ? -1664 : 1664;
      end else begin
        xi = int'($urandom % 3329);
        wi = int'($urandom % 3329) - 1664;
      end
      x = 16'(xi); w = 16'(wi);
      exp_q.push_back(md(longint'(xi) * wi * 169));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
