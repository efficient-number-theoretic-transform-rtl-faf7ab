// bk_adder: WIDTH-bit Brent-Kung parallel-prefix adder with carry in/out.
//
// Bit i produces generate g = a&b and propagate p = a^b. The carry-in is
// folded into bit 0's generate. The prefix operator
// (g1,p1) o (g0,p0) = (g1 | p1&g0, p1&p0) is then applied in a Brent-Kung
// tree: an up-sweep that combines spans of 2, 4, 8 ... bits at positions
// 2^(d+1)-1, 2*2^(d+1)-1, ..., followed by a down-sweep that fills in the
// remaining positions. After the tree, G[i] is the carry out of bit i and
// sum[i] = p[i] ^ G[i-1]. Purely combinational; any WIDTH >= 1 works.
// The adder structure follows the design; the carry-in folding is this
// implementation's choice.
module bk_adder #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned LEVELS = (WIDTH > 1) ? $clog2(WIDTH) : 1;

  logic [WIDTH-1:0] p;
  logic [WIDTH-1:0] gg;
  logic [WIDTH-1:0] pp;

  always_comb begin
    p  = a ^ b;
    gg = a & b;
    pp = p;
    gg[0] = gg[0] | (p[0] & cin);
    // up-sweep
    for (int d = 0; d < int'(LEVELS); d++) begin
      for (int i = (2 << d) - 1; i < int'(WIDTH); i += (2 << d)) begin
        gg[i] = gg[i] | (pp[i] & gg[i - (1 << d)]);
        pp[i] = pp[i] & pp[i - (1 << d)];
      end
    end
    // down-sweep
    for (int d = int'(LEVELS) - 2; d >= 0; d--) begin
      for (int i = 3 * (1 << d) - 1; i < int'(WIDTH); i += (2 << d)) begin
        gg[i] = gg[i] | (pp[i] & gg[i - (1 << d)]);
        pp[i] = pp[i] & pp[i - (1 << d)];
      end
    end
    sum[0] = p[0] ^ cin;
    for (int i = 1; i < int'(WIDTH); i++) sum[i] = p[i] ^ gg[i-1];
    cout = gg[WIDTH-1];
  end
endmodule
