// ntt_ctrl: top-level state machine of the NTT accelerator.
//
// States: IDLE (after reset) -> INPUT -> NTT or INTT -> OUTPUT -> IDLE.
// In IDLE a start pulse latches `mode` (0 = NTT, 1 = INTT) and moves to INPUT.
// On entering each working state the controller sends one `ag_start` pulse
// with the operation to the address generator, and leaves the state when the
// address generator reports `ag_done`. Leaving OUTPUT pulses `done`. `busy`
// is high outside IDLE. A start pulse outside IDLE is ignored. The state set
// follows the design; the handshake with the address generator is this
// implementation's choice.
module ntt_ctrl
  import ntt_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic mode,
  input  logic ag_done,
  output logic ag_start,
  output op_e  ag_op,
  output logic busy,
  output logic done
);
  typedef enum logic [2:0] {
    S_IDLE   = 3'd0,
    S_INPUT  = 3'd1,
    S_NTT    = 3'd2,
    S_INTT   = 3'd3,
    S_OUTPUT = 3'd4
  } state_e;

  state_e state, state_n;
  logic   mode_q;

  always_comb begin
    state_n = state;
    unique case (state)
      S_IDLE:        if (start)   state_n = S_INPUT;
      S_INPUT:       if (ag_done) state_n = mode_q ? S_INTT : S_NTT;
      S_NTT, S_INTT: if (ag_done) state_n = S_OUTPUT;
      S_OUTPUT:      if (ag_done) state_n = S_IDLE;
      default:                    state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      mode_q   <= 1'b0;
      ag_start <= 1'b0;
      ag_op    <= OP_INPUT;
      done     <= 1'b0;
    end else begin
      state    <= state_n;
      ag_start <= (state_n != state) && (state_n != S_IDLE);
      done     <= (state == S_OUTPUT) && (state_n == S_IDLE);
      if (state == S_IDLE && start) mode_q <= mode;
      unique case (state_n)
        S_NTT:    ag_op <= OP_NTT;
        S_INTT:   ag_op <= OP_INTT;
        S_OUTPUT: ag_op <= OP_OUTPUT;
        default:  ag_op <= OP_INPUT;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
