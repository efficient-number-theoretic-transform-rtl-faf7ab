// tb_mod_add: checks (x + y) mod 3329 for reduced operands: corner values
// and random pairs.
module tb_mod_add;
  int checks = 0, failures = 0;
  logic [15:0] x, y, r;
  mod_add dut (.x(x), .y(y), .r(r));

  task automatic check(input int xi, input int yi);
    int e;
    x = 16'(xi); y = 16'(yi);
    #1;
    e = (xi + yi) % 3329;
    checks++;
    if (int'(r) != e) begin
      failures++;
      $display("FAIL %0d + %0d = %0d, expected %0d", xi, yi, r, e);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0); check(3328, 3328); check(3328, 1); check(3328, 0);
    check(1664, 1665); check(1664, 1664);
    for (int i = 0; i < 20000; i++) check(int'($urandom % 3329), int'($urandom % 3329));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
