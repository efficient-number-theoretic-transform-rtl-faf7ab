// tb_bk_adder: checks the Brent-Kung adder against the + operator, for the
// 16-bit default width and for an odd width (13), with random operands and
// the carry corner cases.
module tb_bk_adder;
  int checks = 0, failures = 0;
  logic [15:0] a, b, s;
  logic        ci, co;
  logic [12:0] a13, b13, s13;
  logic        co13;

  bk_adder dut (.a(a), .b(b), .cin(ci), .sum(s), .cout(co));
  bk_adder #(.WIDTH(13)) dut13 (.a(a13), .b(b13), .cin(ci), .sum(s13), .cout(co13));

  task automatic check();
    logic [16:0] e;
    logic [13:0] e13;
    #1;
    e   = 17'(a) + 17'(b) + 17'(ci);
    e13 = 14'(a13) + 14'(b13) + 14'(ci);
    checks += 2;
    if ({co, s} !== e) begin
      failures++;
      $display("FAIL 16: %h + %h + %b = %h, expected %h", a, b, ci, {co, s}, e);
    end
    if ({co13, s13} !== e13) begin
      failures++;
      $display("FAIL 13: %h + %h + %b = %h, expected %h", a13, b13, ci, {co13, s13}, e13);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'hffff; b = 16'h0000; ci = 1'b1; a13 = '1; b13 = '0; check();
    a = 16'hffff; b = 16'hffff; ci = 1'b1; a13 = '1; b13 = '1; check();
    a = 16'h8000; b = 16'h8000; ci = 1'b0; a13 = 13'h1000; b13 = 13'h1000; check();
    a = 16'h5555; b = 16'haaaa; ci = 1'b1; a13 = 13'h0555; b13 = 13'h1aaa; check();
    for (int i = 0; i < 20000; i++) begin
      a = 16'($urandom); b = 16'($urandom); ci = 1'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
