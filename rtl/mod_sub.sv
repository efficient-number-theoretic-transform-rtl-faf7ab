// mod_sub: modular subtraction r = (x - y) mod Q for x, y in [0, Q).
//
// One Brent-Kung adder forms d = x - y (as x + ~y + 1); its carry out is 0
// when the difference is negative, and a second Brent-Kung adder then adds
// Q back. Combinational, 16-bit data words. Building the modular subtractor
// from Brent-Kung adders follows the design; the structure is this
// implementation's choice.
module mod_sub
  import ntt_pkg::*;
(
  input  logic [DW-1:0] x,
  input  logic [DW-1:0] y,
  output logic [DW-1:0] r
);
  logic [DW-1:0] d, t;
  logic          no_borrow, t_c;

  bk_adder #(.WIDTH(DW)) u_sub (.a(x), .b(~y), .cin(1'b1), .sum(d), .cout(no_borrow));
  bk_adder #(.WIDTH(DW)) u_fix (.a(d), .b(DW'(Q)), .cin(1'b0), .sum(t), .cout(t_c));

  assign r = no_borrow ? d : t;

  // for operands below Q, a borrow gives d = x - y + 2^16, and adding Q
  // must wrap past 2^16
  always_comb if (x < DW'(Q) && y < DW'(Q)) assert (no_borrow || t_c) else $error("mod_sub: operand out of range");
endmodule
