// kred: one K-RED step for Q = 3329 = 13 * 2^8 + 1 (k = 13, m = 8).
//
// For a signed 32-bit C it returns S = 13*C0 - C1, where C0 = C[7:0]
// (unsigned) and C1 = C >>> 8 (signed). S is congruent to 13*C mod Q and is
// much smaller than C. Computed as in the design, with shifts and adds only:
// C0 is zero-extended to 24 bits, and S = (C0 << 4) - (C1 + C0 + (C0 << 1)).
// Combinational; the 25-bit signed result is exact for every 32-bit input.
module kred (
  input  logic signed [31:0] c,
  output logic signed [24:0] s
);
  logic        [23:0] c_low;
  logic signed [23:0] c_high;
  logic signed [25:0] c0x16, sub;

  assign c_low  = {16'd0, c[7:0]};
  assign c_high = c[31:8];
  assign c0x16  = $signed({2'b00, c_low} << 4);
  assign sub    = 26'(c_high) + $signed({2'b00, c_low}) + $signed({2'b00, c_low} << 1);
  assign s      = 25'(c0x16 - sub);
endmodule
