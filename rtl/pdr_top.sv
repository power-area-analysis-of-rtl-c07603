// Partially reconfigurable Mul/Div extension of a LEON3 system.
//
// Static side: the ICAP wrapper, an APB slave through which the processor
// streams partial bitstreams into the FPGA's configuration port (and reads
// configuration back). Dynamic side: the reconfigurable Mul/Div region of
// the integer pipeline, holding nothing, the multiplier or the divider.
// The processor, the AHB/APB infrastructure, the ICAP primitive and the
// configuration memory are not part of this RTL: their signals are ports.
//   APB port       from the AHB/APB bridge (12-bit local byte address)
//   ICAP port      to the ICAP primitive (active-low CE and WRITE, 32 bits)
//   rm_id          which module the configuration memory currently holds in
//                  the reconfigurable region (what the last partial
//                  bitstream written through ICAP loaded)
//   muldiv_req/rsp the integer unit's Mul/Div interface (see pdr_pkg)
// The loop from the ICAP port back to `rm_id` closes outside, through the
// configuration memory. One clock; `rst_n` is active low and synchronous.
module pdr_top
  import pdr_pkg::*;
#(
  parameter int unsigned BRAM_DEPTH    = 512,
  parameter int unsigned ACCESS_CYCLES = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  // APB slave
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [PADDR_W-1:0] paddr,
  input  logic [DATA_W-1:0]  pwdata,
  output logic [DATA_W-1:0]  prdata,
  output logic               pready,
  // ICAP primitive
  output logic               icap_ce_n,
  output logic               icap_write_n,
  output logic [DATA_W-1:0]  icap_i,
  input  logic [DATA_W-1:0]  icap_o,
  input  logic               icap_busy,
  // configuration memory: module held by the reconfigurable region
  input  rm_id_t             rm_id,
  // integer unit
  input  muldiv_req_t        muldiv_req,
  output muldiv_rsp_t        muldiv_rsp
);
  logic rst;
  assign rst = ~rst_n;

  icap_wrapper #(.DEPTH(BRAM_DEPTH), .ACCESS_CYCLES(ACCESS_CYCLES)) u_icap_wrapper (
    .clk, .rst, .psel, .penable, .pwrite, .paddr, .pwdata, .prdata, .pready,
    .icap_ce_n, .icap_write_n, .icap_i, .icap_o, .icap_busy
  );

  muldiv_rp u_rp (
    .clk, .rst, .rm_id, .req(muldiv_req), .rsp(muldiv_rsp)
  );
endmodule
