// tb_kred: checks the K-RED step: S = 13*(C mod 256) - floor(C / 256) and
// S = 13*C (mod 3329), for random 32-bit signed C and corner values.
module tb_kred;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic signed [31:0] c;
  logic signed [24:0] s;
  kred dut (.c(c), .s(s));

  task automatic check(input logic signed [31:0] ci);
    longint e;
    c = ci;
    #1;
    e = 13 * longint'(ci & 255) - longint'(ci >>> 8);
    checks += 2;
    if (longint'(s) != e) begin
      failures++;
      $display("FAIL kred(%0d) = %0d, expected %0d", ci, s, e);
    end
    if (md(longint'(s)) != md(13 * longint'(ci))) begin
      failures++;
      $display("FAIL kred(%0d) = %0d not congruent to 13*C", ci, s);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0); check(-1); check(255); check(256); check(32'h7fffffff);
    check(32'sh80000000); check(3329); check(-3329);
    for (int i = 0; i < 20000; i++) check($signed($urandom));
    for (int i = 0; i < 20000; i++) check($signed(32'($urandom % 11000000)) - 5500000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
