// mod_add: modular addition r = (x + y) mod Q for x, y in [0, Q).
//
// One Brent-Kung adder forms s = x + y, a second forms t = s - Q (as
// s + ~Q + 1). If the subtraction does not borrow, t is the result, else s.
// Combinational, 16-bit data words. Building the modular adder from
// Brent-Kung adders follows the design; the add-then-conditionally-subtract
// structure is this implementation's choice.
module mod_add
  import ntt_pkg::*;
(
  input  logic [DW-1:0] x,
  input  logic [DW-1:0] y,
  output logic [DW-1:0] r
);
  logic [DW-1:0] s, t;
  logic          s_c, t_c;
  logic [DW:0]   s_ext;

  bk_adder #(.WIDTH(DW)) u_add (.a(x), .b(y), .cin(1'b0), .sum(s), .cout(s_c));

  assign s_ext = {s_c, s};

  // 17-bit subtract of Q; carry out = 1 means no borrow (s >= Q)
  logic [DW:0] t_full;
  logic        t_cout;
  bk_adder #(.WIDTH(DW+1)) u_sub (
    .a(s_ext), .b(~(DW+1)'(Q)), .cin(1'b1), .sum(t_full), .cout(t_cout));

  assign t   = t_full[DW-1:0];
  assign t_c = t_cout;
  assign r   = t_c ? t : s;

  // for operands below Q, a kept subtraction s - Q is below Q and fits 16 bits
  always_comb if (x < DW'(Q) && y < DW'(Q)) assert (!t_c || !t_full[DW]) else $error("mod_add: operand out of range");
endmodule
