// ntt_io: I/O interface of the NTT accelerator.
//
// Input side: a 16-bit coefficient is accepted in each cycle where din_valid
// and din_ready are both high (din_ready comes from the address generator
// while it steps the input sequence). The accepted word is registered so that
// it reaches the RAM write ports together with its address, one cycle later.
// Output side: when the address generator flags that output data is on the
// port-1 read data of the RAMs, the word of the bank named by out_sel is
// registered onto dout with dout_valid. One coefficient per cycle each way,
// in natural order 0..255; no back-pressure on the output. The interface's
// handshake and timing are this implementation's choice.
module ntt_io
  import ntt_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] din,
  input  logic          din_valid,
  input  logic          din_ready,
  output logic          accept,
  output logic [DW-1:0] din_q,
  input  logic [DW-1:0] ra_rdata,
  input  logic [DW-1:0] rb_rdata,
  input  logic          out_valid,
  input  logic          out_sel,
  output logic [DW-1:0] dout,
  output logic          dout_valid
);
  assign accept = din_valid && din_ready;

  always_ff @(posedge clk) begin
    if (accept) din_q <= din;
    if (out_valid) dout <= out_sel ? rb_rdata : ra_rdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dout_valid <= 1'b0;
    else        dout_valid <= out_valid;
  end
endmodule
