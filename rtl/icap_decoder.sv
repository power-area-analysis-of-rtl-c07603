// ICAP decoder: the main controller of the ICAP wrapper.
//
// It looks at each local-bus access from the slave interface and separates
// bitstream data from instructions, as the document describes. Byte offsets
// below REG_BASE address the dual-port BRAM buffer word by word (port A);
// offsets from REG_BASE up are the wrapper's registers:
//   REG_SIZE   (rw) number of words to move between BRAM and ICAP
//   REG_OFFSET (rw) BRAM word where the transfer starts
//   REG_CTRL   (w)  starts a transfer; bit 0 = 1 reads back from ICAP into
//                   the BRAM, bit 0 = 0 configures (BRAM to ICAP). Ignored
//                   while a transfer is running. Reads return the last value.
//   REG_STATUS (r)  bit 0 done (sticky, cleared by a new start), bit 1 busy
// A start pulses `cmd_start` with the direction in `cmd`, and the size and
// offset go to the address controller. The register map is this design's
// choice; the document names only control and status registers.
//
// Timing: an access arrives as a one-cycle `lb_req`; writes take effect on
// that edge, and `lb_ack` follows one cycle later with `lb_rdata` valid in
// the same cycle (BRAM reads have one cycle of latency). Synchronous reset,
// active high.
module icap_decoder
  import pdr_pkg::*;
#(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic               clk,
  input  logic               rst,
  // local bus
  input  logic               lb_req,
  input  logic               lb_we,
  input  logic [PADDR_W-1:0] lb_addr,
  input  logic [DATA_W-1:0]  lb_wdata,
  output logic               lb_ack,
  output logic [DATA_W-1:0]  lb_rdata,
  // BRAM port A
  output logic               a_en,
  output logic               a_we,
  output logic [AW-1:0]      a_addr,
  output logic [DATA_W-1:0]  a_wdata,
  input  logic [DATA_W-1:0]  a_rdata,
  // to the ICAP state machine and address controller
  output logic               cmd_start,
  output icap_cmd_t          cmd,
  output logic [AW:0]        xfer_size,
  output logic [AW-1:0]      xfer_offset,
  input  logic               fsm_busy,
  input  logic               fsm_done
);
  logic              is_bram;
  logic              sel_bram_q;
  logic [DATA_W-1:0] reg_rdata_q;
  logic              done_q;
  logic              ctrl_q;

  assign is_bram = (lb_addr < REG_BASE);
  assign a_en    = lb_req && is_bram;
  assign a_we    = lb_we;
  assign a_addr  = lb_addr[AW+1:2];
  assign a_wdata = lb_wdata;
  assign lb_rdata = sel_bram_q ? a_rdata : reg_rdata_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      lb_ack      <= 1'b0;
      sel_bram_q  <= 1'b0;
      reg_rdata_q <= '0;
      xfer_size   <= '0;
      xfer_offset <= '0;
      ctrl_q      <= 1'b0;
      done_q      <= 1'b0;
      cmd_start   <= 1'b0;
      cmd         <= '0;
    end else begin
      lb_ack    <= lb_req;
      cmd_start <= 1'b0;
      if (fsm_done) done_q <= 1'b1;
      if (lb_req) begin
        sel_bram_q  <= is_bram;
        reg_rdata_q <= '0;
        if (!is_bram) begin
          unique case (lb_addr)
            REG_SIZE: begin
              if (lb_we && !fsm_busy) xfer_size <= lb_wdata[AW:0];
              reg_rdata_q <= DATA_W'(xfer_size);
            end
            REG_OFFSET: begin
              if (lb_we && !fsm_busy) xfer_offset <= lb_wdata[AW-1:0];
              reg_rdata_q <= DATA_W'(xfer_offset);
            end
            REG_CTRL: begin
              if (lb_we && !fsm_busy) begin
                ctrl_q       <= lb_wdata[CTRL_READBACK_BIT];
                cmd.readback <= lb_wdata[CTRL_READBACK_BIT];
                cmd_start    <= 1'b1;
                done_q       <= 1'b0;
              end
              reg_rdata_q <= DATA_W'(ctrl_q);
            end
            REG_STATUS: begin
              reg_rdata_q[STAT_DONE_BIT] <= done_q;
              reg_rdata_q[STAT_BUSY_BIT] <= fsm_busy | cmd_start;
            end
            default: ;
          endcase
        end
      end
    end
  end
endmodule
