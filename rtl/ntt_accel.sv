// ntt_accel: NTT / INTT accelerator for CRYSTALS-Kyber (n = 256, q = 3329).
//
// One operation: pulse `start` with `mode` (0 = forward NTT, 1 = inverse
// NTT). The accelerator then takes 256 coefficients on din (one per cycle
// while din_valid && din_ready; gaps in din_valid stall the load), transforms
// them in place with two butterfly units, and returns the 256 results on dout
// with dout_valid, in natural order, reduced to [0, q). `done` pulses with the
// last output word. Inputs may be any 16-bit value; they are read as unsigned
// integers, so a negative coefficient must be given as its residue mod q.
//
// Structure: ntt_ctrl sequences IDLE -> INPUT -> NTT/INTT -> OUTPUT. addr_gen
// reads the address sequence of the current operation from addr_seq_rom and
// drives two dual-port RAMs (poly_ram, RAM A for even-parity addresses and
// RAM B for odd-parity ones) and the dual-port twiddle_rom. Butterfly unit 1
// uses port 1 and unit 2 port 2 of both RAMs; the small crossbar here routes
// each unit's inputs from, and its results back to, the right RAM. Results
// return to the addresses they were read from.
//
// Timing: load 256 cycles (without stalls) + 1; transform 7 x 64 = 448 steps
// plus 11 cycles of pipeline (table, RAM read, 9-cycle butterfly); unload 256
// cycles + 3 (table, RAM read, output register); a few cycles of state
// changes between phases. 978 cycles from start to done without input stalls.
//
// The assertions at the end are disabled while rst_n is low, so the lint of
// some simulators reports rst_n as used both asynchronously and synchronously.
module ntt_accel
  import ntt_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          mode,
  input  logic [DW-1:0] din,
  input  logic          din_valid,
  output logic          din_ready,
  output logic [DW-1:0] dout,
  output logic          dout_valid,
  output logic          busy,
  output logic          done
);
  // ---- control
  logic ag_start, ag_done, ag_busy;
  op_e  ag_op;

  ntt_ctrl u_ctrl (
    .clk, .rst_n, .start, .mode,
    .ag_done(ag_done), .ag_start(ag_start), .ag_op(ag_op),
    .busy(busy), .done(done));

  logic             accept;
  logic [AW-1:0]    ra_raddr1, ra_raddr2, rb_raddr1, rb_raddr2;
  logic [AW-1:0]    ra_waddr1, ra_waddr2, rb_waddr1, rb_waddr2;
  logic [TW_AW-1:0] tw_addr1, tw_addr2;
  logic rd_bu_valid, rd_bu_mode, rd_swap1, rd_swap2, rd_out_valid, rd_out_sel;
  logic we, wr_from_input, wr_swap1, wr_swap2;

  addr_gen u_ag (
    .clk, .rst_n,
    .start(ag_start), .op(ag_op), .advance(accept),
    .busy(ag_busy), .in_ready(din_ready),
    .ra_raddr1, .ra_raddr2, .rb_raddr1, .rb_raddr2, .tw_addr1, .tw_addr2,
    .rd_bu_valid, .rd_bu_mode, .rd_swap1, .rd_swap2, .rd_out_valid, .rd_out_sel,
    .we, .wr_from_input, .wr_swap1, .wr_swap2,
    .ra_waddr1, .ra_waddr2, .rb_waddr1, .rb_waddr2,
    .op_done(ag_done));

  // ---- memories
  logic [DW-1:0] ra_rdata1, ra_rdata2, rb_rdata1, rb_rdata2;
  logic [DW-1:0] ra_wdata1, ra_wdata2, rb_wdata1, rb_wdata2;
  logic signed [DW-1:0] w1, w2;

  poly_ram #(.DEPTH(N), .WIDTH(DW)) u_ram_a (
    .clk, .we,
    .p1_raddr(ra_raddr1), .p1_waddr(ra_waddr1), .p1_wdata(ra_wdata1), .p1_rdata(ra_rdata1),
    .p2_raddr(ra_raddr2), .p2_waddr(ra_waddr2), .p2_wdata(ra_wdata2), .p2_rdata(ra_rdata2));

  poly_ram #(.DEPTH(N), .WIDTH(DW)) u_ram_b (
    .clk, .we,
    .p1_raddr(rb_raddr1), .p1_waddr(rb_waddr1), .p1_wdata(rb_wdata1), .p1_rdata(rb_rdata1),
    .p2_raddr(rb_raddr2), .p2_waddr(rb_waddr2), .p2_wdata(rb_wdata2), .p2_rdata(rb_rdata2));

  twiddle_rom u_rom (.clk, .addr1(tw_addr1), .addr2(tw_addr2), .w1(w1), .w2(w2));

  // ---- I/O
  logic [DW-1:0] din_q;
  ntt_io u_io (
    .clk, .rst_n, .din, .din_valid, .din_ready, .accept, .din_q,
    .ra_rdata(ra_rdata1), .rb_rdata(rb_rdata1),
    .out_valid(rd_out_valid), .out_sel(rd_out_sel),
    .dout, .dout_valid);

  // ---- butterfly units with input/output crossbar
  logic [DW-1:0] bu_a [NBU], bu_b [NBU], bu_c [NBU], bu_d [NBU];
  logic          bu_ov [NBU];

  assign bu_a[0] = rd_swap1 ? rb_rdata1 : ra_rdata1;
  assign bu_b[0] = rd_swap1 ? ra_rdata1 : rb_rdata1;
  assign bu_a[1] = rd_swap2 ? rb_rdata2 : ra_rdata2;
  assign bu_b[1] = rd_swap2 ? ra_rdata2 : rb_rdata2;

  butterfly u_bu1 (
    .clk, .rst_n, .in_valid(rd_bu_valid), .mode(rd_bu_mode),
    .a(bu_a[0]), .b(bu_b[0]), .w(w1),
    .out_valid(bu_ov[0]), .c(bu_c[0]), .d(bu_d[0]));

  butterfly u_bu2 (
    .clk, .rst_n, .in_valid(rd_bu_valid), .mode(rd_bu_mode),
    .a(bu_a[1]), .b(bu_b[1]), .w(w2),
    .out_valid(bu_ov[1]), .c(bu_c[1]), .d(bu_d[1]));

  always_comb begin
    if (wr_from_input) begin
      ra_wdata1 = din_q; rb_wdata1 = din_q;
      ra_wdata2 = din_q; rb_wdata2 = din_q;
    end else begin
      ra_wdata1 = wr_swap1 ? bu_d[0] : bu_c[0];
      rb_wdata1 = wr_swap1 ? bu_c[0] : bu_d[0];
      ra_wdata2 = wr_swap2 ? bu_d[1] : bu_c[1];
      rb_wdata2 = wr_swap2 ? bu_c[1] : bu_d[1];
    end
  end

  // butterfly results arrive exactly when the address generator writes them;
  // the address generator only runs while the controller is busy
  a_wb_align: assert property (@(posedge clk) disable iff (!rst_n)
      bu_ov[0] == (we && !wr_from_input))
    else $error("ntt_accel: butterfly output not aligned with write-back");
  a_bu_step: assert property (@(posedge clk) disable iff (!rst_n) bu_ov[1] == bu_ov[0])
    else $error("ntt_accel: butterfly units out of step");
  a_ag_busy: assert property (@(posedge clk) disable iff (!rst_n) !ag_busy || busy)
    else $error("ntt_accel: address generator running while idle");
endmodule
