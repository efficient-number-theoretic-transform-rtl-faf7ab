// mod_reduce: reduces any unsigned 16-bit word to [0, Q).
//
// Coefficients entering the accelerator are not required to be reduced, so
// each butterfly input first passes through this unit. It is a chain of five
// compare-and-subtract steps by 16Q, 8Q, 4Q, 2Q and Q, each a Brent-Kung
// subtractor whose carry out says whether the subtraction is kept. Since
// 2^16 < 32Q the result is below Q. Combinational. The need to accept
// unreduced inputs follows the design; this circuit is this implementation's
// own choice.
module mod_reduce
  import ntt_pkg::*;
(
  input  logic [DW-1:0] x,
  output logic [DW-1:0] r
);
  localparam int unsigned STEPS = 5;

  logic [DW-1:0] v [STEPS+1];
  assign v[0] = x;

  for (genvar s = 0; s < STEPS; s++) begin : g_step
    localparam logic [DW-1:0] K = DW'(Q << (STEPS - 1 - s));
    logic [DW-1:0] diff;
    logic          keep;
    bk_adder #(.WIDTH(DW)) u_sub (.a(v[s]), .b(~K), .cin(1'b1), .sum(diff), .cout(keep));
    assign v[s+1] = keep ? diff : v[s];
  end

  assign r = v[STEPS];
endmodule
