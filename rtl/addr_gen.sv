// addr_gen: address generator of the NTT accelerator.
//
// After a start pulse it steps through the address sequence of one operation
// (op): 448 steps for NTT or INTT (7 layers x 64 cycles, two butterflies per
// step) and 256 for input or output (one coefficient per step). During input
// a step is taken only in cycles where `advance` is high (a coefficient was
// accepted); the other operations step every cycle. Each step index is looked
// up in addr_seq_rom. From the table word it derives:
//   * read addresses of the four RAM ports and the two twiddle ROM ports.
//     Coefficient i lives in RAM B if ^i = 1, else in RAM A; butterfly unit 1
//     uses port 1 and unit 2 port 2 of both RAMs. `swap` = 1 means the upper
//     input a of that unit is in RAM B;
//   * the same swap bits one cycle later, when RAM and ROM data arrive, to
//     steer the butterfly inputs (rd_*), and the output-data select;
//   * write addresses and the write enable: for input in the cycle after the
//     table read, together with the registered input word; for NTT/INTT
//     BU_LATENCY cycles after the butterfly inputs, when the results leave the
//     butterflies (wr_*). Results go back to the addresses they came from.
// op_done pulses when the last write (input, NTT, INTT) is done, or when the
// last output word is on the RAM read ports (output).
//
// Pipeline for step s issued in cycle t: table word t+1, RAM/ROM data t+2,
// write t+2+BU_LATENCY. Inside one layer sequence the earliest re-read of a
// written coefficient is 32 cycles later, so the 11-cycle write-back needs no
// stall. Following the design, the sequence comes from a table indexed by
// mode and layer; the bank mapping and timing are this implementation's.
// The collision assertion is disabled during reset, which makes Verilator
// report rst_n as used both asynchronously and synchronously.
module addr_gen
  import ntt_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  op_e           op,
  input  logic          advance,
  output logic          busy,
  output logic          in_ready,
  // read addresses (valid the cycle after the table read)
  output logic [AW-1:0]    ra_raddr1,
  output logic [AW-1:0]    ra_raddr2,
  output logic [AW-1:0]    rb_raddr1,
  output logic [AW-1:0]    rb_raddr2,
  output logic [TW_AW-1:0] tw_addr1,
  output logic [TW_AW-1:0] tw_addr2,
  // aligned with RAM/ROM read data
  output logic          rd_bu_valid,
  output logic          rd_bu_mode,
  output logic          rd_swap1,
  output logic          rd_swap2,
  output logic          rd_out_valid,
  output logic          rd_out_sel,
  // write side
  output logic          we,
  output logic          wr_from_input,
  output logic          wr_swap1,
  output logic          wr_swap2,
  output logic [AW-1:0] ra_waddr1,
  output logic [AW-1:0] ra_waddr2,
  output logic [AW-1:0] rb_waddr1,
  output logic [AW-1:0] rb_waddr2,
  output logic          op_done
);
  // ---- step counter
  logic [SEQ_IDX_W-1:0] idx;
  logic                 active;
  op_e                  op_q;
  logic                 step, last_step;

  assign step      = active && (op_q != OP_INPUT || advance);
  assign last_step = (32'(idx) == op_steps(op_q) - 1);
  assign busy      = active;
  assign in_ready  = active && op_q == OP_INPUT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx    <= '0;
      active <= 1'b0;
      op_q   <= OP_NTT;
    end else if (start) begin
      idx    <= '0;
      active <= 1'b1;
      op_q   <= op;
    end else if (step) begin
      idx <= idx + 1'b1;
      if (last_step) active <= 1'b0;
    end
  end

  // ---- table read (stage 1)
  seq_entry_t e1;
  addr_seq_rom u_seq (.clk(clk), .addr({op_q, idx}), .data(e1));

  logic v1, last1;
  op_e  op1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; last1 <= 1'b0; op1 <= OP_NTT;
    end else begin
      v1 <= step; last1 <= step && last_step; op1 <= op_q;
    end
  end

  logic s1_swap1, s1_swap2;
  assign s1_swap1  = bank_of(e1.a1);
  assign s1_swap2  = bank_of(e1.a2);
  assign ra_raddr1 = s1_swap1 ? e1.b1 : e1.a1;
  assign rb_raddr1 = s1_swap1 ? e1.a1 : e1.b1;
  assign ra_raddr2 = s1_swap2 ? e1.b2 : e1.a2;
  assign rb_raddr2 = s1_swap2 ? e1.a2 : e1.b2;
  assign tw_addr1  = {op1 == OP_INTT, e1.k1};
  assign tw_addr2  = {op1 == OP_INTT, e1.k2};

  // ---- data stage (stage 2)
  typedef struct packed {
    logic          v;
    logic          last;
    logic [AW-1:0] a1, b1, a2, b2;
  } wr_info_t;

  logic     v2, last2;
  op_e      op2;
  wr_info_t w2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v2 <= 1'b0; last2 <= 1'b0; op2 <= OP_NTT; w2 <= '0;
    end else begin
      v2 <= v1; last2 <= last1; op2 <= op1;
      w2 <= '{v: v1 && (op1 == OP_NTT || op1 == OP_INTT), last: last1,
              a1: e1.a1, b1: e1.b1, a2: e1.a2, b2: e1.b2};
    end
  end

  assign rd_bu_valid  = w2.v;
  assign rd_bu_mode   = (op2 == OP_INTT);
  assign rd_swap1     = bank_of(w2.a1);
  assign rd_swap2     = bank_of(w2.a2);
  assign rd_out_valid = v2 && op2 == OP_OUTPUT;
  assign rd_out_sel   = bank_of(w2.a1);

  // ---- write-back delay (butterfly latency)
  wr_info_t wq [BU_LATENCY];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(BU_LATENCY); i++) wq[i] <= '0;
    end else begin
      wq[0] <= w2;
      for (int i = 1; i < int'(BU_LATENCY); i++) wq[i] <= wq[i-1];
    end
  end

  wr_info_t wb;
  logic     in_wr;
  assign wb    = wq[BU_LATENCY-1];
  assign in_wr = v1 && op1 == OP_INPUT;

  always_comb begin
    we            = in_wr || wb.v;
    wr_from_input = in_wr;
    wr_swap1      = bank_of(wb.a1);
    wr_swap2      = bank_of(wb.a2);
    if (in_wr) begin
      ra_waddr1 = e1.a1; rb_waddr1 = e1.a1;
      ra_waddr2 = e1.a1; rb_waddr2 = e1.a1;
    end else begin
      ra_waddr1 = wr_swap1 ? wb.b1 : wb.a1;
      rb_waddr1 = wr_swap1 ? wb.a1 : wb.b1;
      ra_waddr2 = wr_swap2 ? wb.b2 : wb.a2;
      rb_waddr2 = wr_swap2 ? wb.a2 : wb.b2;
    end
  end

  assign op_done = (in_wr && last1) || (wb.v && wb.last) ||
                   (rd_out_valid && last2);

  // input writes and butterfly write-backs never overlap
  a_no_collide: assert property (@(posedge clk) disable iff (!rst_n) !(in_wr && wb.v))
    else $error("addr_gen: input write collides with butterfly write-back");
endmodule
