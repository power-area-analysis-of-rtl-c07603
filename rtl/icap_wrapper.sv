// ICAP wrapper: the hardware between the APB bus and the ICAP primitive.
//
// Software reconfigures the FPGA by copying a partial bitstream into the
// BRAM buffer through APB, a block of up to DEPTH words at a time, and then
// starting a configure transfer that the ICAP state machine streams word by
// word into ICAP. Readback goes the other way: a readback transfer fills the
// BRAM from ICAP and software reads the BRAM. The structure follows the
// document's block diagram: slave interface -> ICAP decoder -> ICAP state
// machine -> address controller -> dual-port BRAM <-> ICAP controller ->
// ICAP. The register map and handshakes inside are this design's (see the
// sub-blocks). The ICAP primitive itself is outside, on the `icap_*` port.
//
// Interface: an APB slave with a 12-bit local byte address and wait states
// (`pready`, ACCESS_CYCLES access cycles per transfer), and the 32-bit ICAP
// port with active-low `icap_ce_n` / `icap_write_n`. One clock; synchronous
// reset, active high.
module icap_wrapper
  import pdr_pkg::*;
#(
  parameter int unsigned DEPTH         = 512,
  parameter int unsigned ACCESS_CYCLES = 4
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [PADDR_W-1:0] paddr,
  input  logic [DATA_W-1:0]  pwdata,
  output logic [DATA_W-1:0]  prdata,
  output logic               pready,
  output logic               icap_ce_n,
  output logic               icap_write_n,
  output logic [DATA_W-1:0]  icap_i,
  input  logic [DATA_W-1:0]  icap_o,
  input  logic               icap_busy
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic               lb_req, lb_we, lb_ack;
  logic [PADDR_W-1:0] lb_addr;
  logic [DATA_W-1:0]  lb_wdata, lb_rdata;
  logic               a_en, a_we, b_en, b_we;
  logic [AW-1:0]      a_addr, b_addr;
  logic [DATA_W-1:0]  a_wdata, a_rdata, b_wdata, b_rdata;
  logic               cmd_start, fsm_busy, fsm_done;
  icap_cmd_t          cmd;
  logic [AW:0]        xfer_size;
  logic [AW-1:0]      xfer_offset;
  logic               ac_load, ac_inc, ac_last, ac_empty;
  logic               ic_start, ic_write, ic_done;

  apb_slave_if #(.ACCESS_CYCLES(ACCESS_CYCLES)) u_slave (
    .clk, .rst, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .lb_req, .lb_we, .lb_addr, .lb_wdata, .lb_ack, .lb_rdata
  );

  icap_decoder #(.DEPTH(DEPTH)) u_dec (
    .clk, .rst, .lb_req, .lb_we, .lb_addr, .lb_wdata, .lb_ack, .lb_rdata,
    .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .cmd_start, .cmd, .xfer_size, .xfer_offset, .fsm_busy, .fsm_done
  );

  icap_fsm u_fsm (
    .clk, .rst, .start(cmd_start), .cmd,
    .ac_load, .ac_inc, .ac_last, .ac_empty,
    .ic_start, .ic_write, .ic_done,
    .busy(fsm_busy), .done(fsm_done)
  );

  icap_addr_ctrl #(.DEPTH(DEPTH)) u_addr (
    .clk, .rst, .load(ac_load), .offset(xfer_offset), .size(xfer_size),
    .inc(ac_inc), .addr(b_addr), .last(ac_last), .empty(ac_empty)
  );

  dpram #(.DEPTH(DEPTH), .WIDTH(DATA_W)) u_bram (
    .clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata
  );

  icap_ctrl u_ictrl (
    .clk, .rst, .start(ic_start), .write(ic_write), .done(ic_done),
    .b_en, .b_we, .b_wdata, .b_rdata,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_o, .icap_busy
  );
endmodule
