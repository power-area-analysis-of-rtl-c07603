// ICAP state machine of the ICAP wrapper.
//
// Sequences one transfer between the BRAM buffer and ICAP, word by word.
// The document only names this block and shows that it drives the address
// controller and talks with the ICAP controller; the sequence below is this
// design's choice.
//   IDLE   wait for `start`; on it the address controller loads offset/size
//   CHECK  finish at once if the size is zero
//   ISSUE  ask the ICAP controller to move one word (`ic_start`,
//          `ic_write` = 1 for configuration, 0 for readback)
//   WAIT   wait for `ic_done`; then step the address controller and either
//          issue the next word or finish
//   FIN    one-cycle `done` pulse, back to IDLE
// `busy` is high from the cycle after `start` until `done`. Synchronous
// reset, active high.
module icap_fsm
  import pdr_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      start,
  input  icap_cmd_t cmd,
  // address controller
  output logic      ac_load,
  output logic      ac_inc,
  input  logic      ac_last,
  input  logic      ac_empty,
  // ICAP controller
  output logic      ic_start,
  output logic      ic_write,
  input  logic      ic_done,
  // status
  output logic      busy,
  output logic      done
);
  typedef enum logic [2:0] {IDLE, CHECK, ISSUE, WAIT, FIN} state_t;
  state_t state, state_n;
  logic   readback_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state      <= IDLE;
      readback_q <= 1'b0;
    end else begin
      state <= state_n;
      if (state == IDLE && start) readback_q <= cmd.readback;
    end
  end

  always_comb begin
    state_n  = state;
    ac_load  = 1'b0;
    ac_inc   = 1'b0;
    ic_start = 1'b0;
    ic_write = ~readback_q;
    done     = 1'b0;
    unique case (state)
      IDLE:  if (start) begin
               ac_load = 1'b1;
               state_n = CHECK;
             end
      CHECK: state_n = ac_empty ? FIN : ISSUE;
      ISSUE: begin
               ic_start = 1'b1;
               state_n  = WAIT;
             end
      WAIT:  if (ic_done) begin
               ac_inc  = 1'b1;
               state_n = ac_last ? FIN : ISSUE;
             end
      FIN:   begin
               done    = 1'b1;
               state_n = IDLE;
             end
      default: state_n = IDLE;
    endcase
  end

  assign busy = (state != IDLE);
endmodule
