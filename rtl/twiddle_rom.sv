// twiddle_rom: dual-port 256 x 16-bit ROM of pre-computed twiddle factors.
//
// Address {inv, k}: inv = 0 gives the forward twiddle zeta(k) * 169^-1 mod Q,
// inv = 1 the inverse twiddle -zeta(k) * 2^-1 * 169^-1 mod Q, where
// zeta(k) = 17^bitrev7(k) mod Q is Kyber's k-th twiddle (k = 1..127 are
// used). Values are signed 16-bit, centred around zero. The contents are
// computed at elaboration by ntt_pkg::twiddle_value. Both ports read
// synchronously with one cycle of latency. A dual-port 256 x 16 ROM of signed
// twiddles follows the design; the scaling of the stored values is this
// implementation's choice (see mod_mul).
module twiddle_rom
  import ntt_pkg::*;
(
  input  logic                 clk,
  input  logic [TW_AW-1:0]     addr1,
  input  logic [TW_AW-1:0]     addr2,
  output logic signed [DW-1:0] w1,
  output logic signed [DW-1:0] w2
);
  logic signed [DW-1:0] rom [2**TW_AW];

  initial begin
    for (int i = 0; i < 2**TW_AW; i++) rom[i] = twiddle_value(i);
  end

  always_ff @(posedge clk) begin
    w1 <= rom[addr1];
    w2 <= rom[addr2];
  end
endmodule
