// ICAP controller of the ICAP wrapper.
//
// Moves one 32-bit word between the BRAM buffer (port B) and the ICAP port
// per request of the ICAP state machine. The document gives its role; the
// port handshake is this design's reading of the Virtex-4 ICAP: `icap_ce_n`
// and `icap_write_n` are active low, and a word passes on a rising edge
// where `icap_ce_n` is low and `icap_busy` is low. ICAP may hold `icap_busy`
// high for any number of cycles; the controller keeps its request (and its
// write data) until the word passes.
//   write: read the BRAM word (1 cycle), then drive it on `icap_i` with
//          `icap_write_n` low until it passes
//   read:  drive `icap_ce_n` low with `icap_write_n` high until a word
//          passes, capture `icap_o`, write it into the BRAM (1 cycle)
// `done` is a one-cycle pulse in the cycle the word completes. Synchronous
// reset, active high.
module icap_ctrl
  import pdr_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              start,
  input  logic              write,
  output logic              done,
  // BRAM port B (address comes from the address controller)
  output logic              b_en,
  output logic              b_we,
  output logic [DATA_W-1:0] b_wdata,
  input  logic [DATA_W-1:0] b_rdata,
  // ICAP port
  output logic              icap_ce_n,
  output logic              icap_write_n,
  output logic [DATA_W-1:0] icap_i,
  input  logic [DATA_W-1:0] icap_o,
  input  logic              icap_busy
);
  typedef enum logic [2:0] {IDLE, W_FETCH, W_SEND, R_WAIT, R_STORE} state_t;
  state_t state;
  logic [DATA_W-1:0] rd_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= IDLE;
      rd_q  <= '0;
    end else begin
      unique case (state)
        IDLE:    if (start) state <= write ? W_FETCH : R_WAIT;
        W_FETCH: state <= W_SEND;
        W_SEND:  if (!icap_busy) state <= IDLE;
        R_WAIT:  if (!icap_busy) begin
                   rd_q  <= icap_o;
                   state <= R_STORE;
                 end
        R_STORE: state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  always_comb begin
    b_en         = (state == W_FETCH) || (state == R_STORE);
    b_we         = (state == R_STORE);
    b_wdata      = rd_q;
    icap_ce_n    = !((state == W_SEND) || (state == R_WAIT));
    icap_write_n = (state != W_SEND);
    icap_i       = (state == W_SEND) ? b_rdata : '0;
    done         = ((state == W_SEND) && !icap_busy) || (state == R_STORE);
  end
endmodule
