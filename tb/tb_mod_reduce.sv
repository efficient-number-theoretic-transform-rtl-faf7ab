// tb_mod_reduce: exhaustive check of x mod 3329 for every 16-bit x.
module tb_mod_reduce;
  int checks = 0, failures = 0;
  logic [15:0] x, r;
  mod_reduce dut (.x(x), .r(r));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      x = 16'(i);
      #1;
      checks++;
      if (int'(r) != i % 3329) begin
        failures++;
        if (failures < 10) $display("FAIL %0d -> %0d, expected %0d", i, r, i % 3329);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
