// addr_seq_rom: block-RAM table of the address sequence of every operation.
//
// Address {op, idx}: for OP_NTT and OP_INTT, idx = layer * 64 + cycle
// (0..447) and the word holds, for both butterfly units, the two coefficient
// addresses (a, a + len) and the twiddle index of the butterfly processed in
// that cycle; for OP_INPUT and OP_OUTPUT, idx = 0..255 and the word holds the
// coefficient address. Keeping the sequence in a table instead of computing
// it in logic shortens the address path. Contents are computed at elaboration
// by ntt_pkg::seq_value; the read is synchronous with one cycle of latency.
// Storing the sequences in block RAM follows the design; the word layout is
// this implementation's choice.
module addr_seq_rom
  import ntt_pkg::*;
(
  input  logic              clk,
  input  logic [SEQ_AW-1:0] addr,
  output seq_entry_t        data
);
  seq_entry_t rom [2**SEQ_AW];

  initial begin
    for (int o = 0; o < 4; o++)
      for (int i = 0; i < 2**SEQ_IDX_W; i++)
        rom[o * 2**SEQ_IDX_W + i] = seq_value(op_e'(o), i);
  end

  always_ff @(posedge clk) data <= rom[addr];
endmodule
