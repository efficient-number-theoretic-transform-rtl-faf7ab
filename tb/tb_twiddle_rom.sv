// tb_twiddle_rom: reads every address on both ports and checks, with
// t = w * 169 mod q: forward entries t = 17^bitrev7(k), inverse entries
// 2t = -17^bitrev7(k) (mod 3329); all values centred in [-1664, 1664];
// read latency one cycle.
module tb_twiddle_rom;
  import tb_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [7:0] a1, a2;
  logic signed [15:0] w1, w2;

  twiddle_rom dut (.clk, .addr1(a1), .addr2(a2), .w1(w1), .w2(w2));
  always #5 clk = ~clk;

  function automatic bit ok(input int addr, input int w);
    int z = kyber_zeta(addr % 128);
    if (w < -1664 || w > 1664) return 0;
    if (addr < 128) return md(longint'(w) * 169) == z;
    return md(longint'(w) * 169 * 2) == md(-z);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      a1 = 8'(i); a2 = 8'(255 - i);
      @(negedge clk);
      checks += 2;
      if (!ok(i, int'(w1)) || !ok(255 - i, int'(w2))) begin
        failures++;
        $display("FAIL addr %0d/%0d: %0d %0d", i, 255 - i, w1, w2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
