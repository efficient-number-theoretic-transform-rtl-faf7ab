// mod_mul: pipelined modular multiplication r = x * w * 169 mod Q.
//
// x is an unsigned coefficient in [0, Q), w a signed twiddle factor. The
// product (|x*w| < 2^23) is formed by a two-register multiplier that maps onto
// one FPGA DSP block (input-side product register and output register). Two
// K-RED steps follow, one per cycle, each multiplying the value by 13 modulo Q
// while shrinking it: after the first |D| < 2^15, after the second
// -97 <= D <= 3400. A last stage adds or subtracts Q once to give r in
// [0, Q). Because two K-RED steps scale by 13*13 = 169, the twiddle ROM
// stores every twiddle pre-multiplied by 169^-1 mod Q, so the result is the
// true product of x and the original twiddle.
//
// Timing: fully pipelined, one product per cycle, latency MUL_LATENCY = 5.
// The DSP multiplier followed by K-RED follows the design; the second K-RED
// step, the pre-scaled twiddles and the final correction are this
// implementation's choices that make the result exact.
module mod_mul
  import ntt_pkg::*;
(
  input  logic                 clk,
  input  logic [DW-1:0]        x,
  input  logic signed [DW-1:0] w,
  output logic [DW-1:0]        r
);
  logic signed [31:0] p1, p2;
  logic signed [24:0] k1_c, k2_c;
  logic signed [24:0] k1, k2;
  logic [DW-1:0]      k2_fix;

  kred u_kred1 (.c(p2), .s(k1_c));
  kred u_kred2 (.c(32'(k1)), .s(k2_c));

  always_comb begin
    if (k2 < 0)             k2_fix = DW'(k2 + 25'(Q));
    else if (k2 >= 25'(Q))  k2_fix = DW'(k2 - 25'(Q));
    else                    k2_fix = DW'(k2);
  end

  always_ff @(posedge clk) begin
    p1 <= $signed({16'd0, x}) * 32'(w);
    p2 <= p1;
    k1 <= k1_c;
    k2 <= k2_c;
    r  <= k2_fix;
  end
endmodule
