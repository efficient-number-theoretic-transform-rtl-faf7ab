// butterfly: dual-configuration radix-2 butterfly for the Kyber NTT/INTT.
//
// mode = 0 (Cooley-Tukey, forward NTT):   c = a + w*b,       d = a - w*b
// mode = 1 (Gentleman-Sande, inverse):    c = (a + b) / 2,   d = (a - b) * w
// All results are fully reduced to [0, Q). Inputs a and b may be any 16-bit
// value (they need not be reduced). w is the signed twiddle word read from the
// twiddle ROM, pre-scaled by 169^-1 (and, for the inverse, by 2^-1) so that the
// K-RED multiplier returns the exact product. Halving (a + b) in every inverse
// layer divides the result of the 7-layer INTT by 2^7 = 128, which is Kyber's
// final n^-1 scaling, so no separate scaling pass is needed.
//
// The unit has three arithmetic stages shared by both modes: (1) modular
// add/sub, used by GS before the multiplier; (2) modular multiplication
// (DSP + K-RED); (3) modular add/sub, used by CT after the multiplier, or the
// modular halving for GS. Pipeline registers:
//   1 input reduction   2 pre add/sub   3-7 mod_mul   8 post add/sub   9 output
// Latency is BU_LATENCY = 9 cycles, throughput one butterfly per cycle; the
// mode travels with the data, so consecutive butterflies may use either mode.
// in_valid is carried alongside to out_valid. The 9-cycle latency, the
// three-stage structure and the Brent-Kung add/sub follow the design; the
// division of the pipeline and the merged /2 are this implementation's choice.
module butterfly
  import ntt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 mode,      // 0: CT (NTT), 1: GS (INTT)
  input  logic [DW-1:0]        a,
  input  logic [DW-1:0]        b,
  input  logic signed [DW-1:0] w,
  output logic                 out_valid,
  output logic [DW-1:0]        c,
  output logic [DW-1:0]        d
);
  // ---- stage 1: bring inputs into [0, Q)
  logic [DW-1:0] a_red, b_red;
  mod_reduce u_ra (.x(a), .r(a_red));
  mod_reduce u_rb (.x(b), .r(b_red));

  logic [DW-1:0]        a1, b1;
  logic signed [DW-1:0] w1;
  logic                 m1;

  always_ff @(posedge clk) begin
    a1 <= a_red;
    b1 <= b_red;
    w1 <= w;
    m1 <= mode;
  end

  // ---- stage 2: GS pre-processing (a+b, a-b); CT passes a, b
  logic [DW-1:0] pre_sum, pre_dif;
  mod_add u_pre_add (.x(a1), .y(b1), .r(pre_sum));
  mod_sub u_pre_sub (.x(a1), .y(b1), .r(pre_dif));

  logic [DW-1:0]        x2, y2;
  logic signed [DW-1:0] w2;
  logic                 m2;

  always_ff @(posedge clk) begin
    x2 <= m1 ? pre_dif : b1;   // multiplier operand
    y2 <= m1 ? pre_sum : a1;   // bypasses the multiplier
    w2 <= w1;
    m2 <= m1;
  end

  // ---- multiplier, MUL_LATENCY cycles, with matching delay of y and mode
  logic [DW-1:0] u7;
  mod_mul u_mul (.clk(clk), .x(x2), .w(w2), .r(u7));

  logic [DW-1:0] y_dly [MUL_LATENCY];
  logic          m_dly [MUL_LATENCY];
  always_ff @(posedge clk) begin
    y_dly[0] <= y2;
    m_dly[0] <= m2;
    for (int i = 1; i < int'(MUL_LATENCY); i++) begin
      y_dly[i] <= y_dly[i-1];
      m_dly[i] <= m_dly[i-1];
    end
  end
  logic [DW-1:0] y7;
  logic          m7;
  assign y7 = y_dly[MUL_LATENCY-1];
  assign m7 = m_dly[MUL_LATENCY-1];

  // ---- stage 3: CT post-processing (y + u, y - u); GS halves y
  logic [DW-1:0] post_sum, post_dif, half_odd;
  logic          half_c;
  mod_add u_post_add (.x(y7), .y(u7), .r(post_sum));
  mod_sub u_post_sub (.x(y7), .y(u7), .r(post_dif));
  // (y / 2) mod Q: y >> 1, plus (Q + 1) / 2 when y is odd
  bk_adder #(.WIDTH(DW)) u_half (
    .a({1'b0, y7[DW-1:1]}), .b(DW'((Q + 1) / 2)), .cin(1'b0),
    .sum(half_odd), .cout(half_c));

  logic [DW-1:0] c8, d8;
  always_ff @(posedge clk) begin
    if (m7) begin
      c8 <= y7[0] ? half_odd : {1'b0, y7[DW-1:1]};
      d8 <= u7;
    end else begin
      c8 <= post_sum;
      d8 <= post_dif;
    end
    c <= c8;
    d <= d8;
  end

  // ---- valid pipeline
  logic [BU_LATENCY-1:0] v_sr;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_sr <= '0;
    else        v_sr <= {v_sr[BU_LATENCY-2:0], in_valid};
  end
  assign out_valid = v_sr[BU_LATENCY-1];

  // carry out of the halving adder cannot be set while y < Q
  always_comb if (y7 < DW'(Q)) assert (!(m7 && half_c)) else $error("butterfly: halving overflow");
endmodule
