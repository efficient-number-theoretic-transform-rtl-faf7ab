// poly_ram: dual-port 256 x 16-bit block RAM for polynomial coefficients.
//
// Each of the two ports has its own read address, write address and write
// data. Reads are synchronous: rdata shows the word at raddr one cycle after
// raddr is applied, every cycle (a read that coincides with a write to the
// same address returns the old word). When we = 1 both ports write their
// wdata at their waddr on the rising clock edge; if both ports write the same
// address, port 2 wins. The accelerator uses two instances (RAM A and RAM B),
// whose four ports give the two butterfly units two reads and two writes
// each per cycle. The port set and the shared write enable follow the design;
// concurrent read and write and the read latency are this implementation's
// choices.
module poly_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AWID = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AWID-1:0]  p1_raddr,
  input  logic [AWID-1:0]  p1_waddr,
  input  logic [WIDTH-1:0] p1_wdata,
  output logic [WIDTH-1:0] p1_rdata,
  input  logic [AWID-1:0]  p2_raddr,
  input  logic [AWID-1:0]  p2_waddr,
  input  logic [WIDTH-1:0] p2_wdata,
  output logic [WIDTH-1:0] p2_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      mem[p1_waddr] <= p1_wdata;
      mem[p2_waddr] <= p2_wdata;
    end
    p1_rdata <= mem[p1_raddr];
    p2_rdata <= mem[p2_raddr];
  end
endmodule
