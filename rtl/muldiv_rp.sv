// Reconfigurable Mul/Div region of the integer pipeline.
//
// In the FPGA this region is a floorplanned block whose contents are
// swapped at run time through ICAP: it holds either nothing (a blank
// bitstream), the 1-cycle 32x32 multiplier or the 36-cycle 64/32 divider.
// The document gives that arrangement; how the swap is modelled in RTL is
// this design's choice. Both modules are instantiated, and `rm_id` - the
// module the configuration memory currently holds, reported by the ICAP
// side - chooses the one that is present. The absent module is kept in
// reset, which also resets a module that has just been swapped in, and its
// outputs are not seen. A request for a unit that is not loaded (including
// any request to a blank region) is answered in the next cycle with a
// one-cycle `unimpl` pulse instead of `ready`, so the integer unit can
// trap as for an unimplemented instruction.
//
// Interface: `req` carries one-cycle start strobes and operands (see
// pdr_pkg); `rsp.ready` marks the result: one cycle after a multiply
// start, 36 cycles after a divide start. `rst` is synchronous, active high.
module muldiv_rp
  import pdr_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  rm_id_t      rm_id,
  input  muldiv_req_t req,
  output muldiv_rsp_t rsp
);
  logic mul_present, div_present;
  logic mul_ready, div_ready, div_busy, div_ovf, div_dbz;
  logic [63:0] mul_prod;
  logic [31:0] div_quot;
  logic unimpl_q;

  assign mul_present = (rm_id == RM_MUL);
  assign div_present = (rm_id == RM_DIV);

  mul32 u_mul (
    .clk   (clk),
    .rst   (rst | ~mul_present),
    .start (req.start_mul & mul_present),
    .sgn   (req.sgn),
    .op1   (req.op1),
    .op2   (req.op2),
    .ready (mul_ready),
    .prod  (mul_prod)
  );

  div64 u_div (
    .clk   (clk),
    .rst   (rst | ~div_present),
    .start (req.start_div & div_present),
    .sgn   (req.sgn),
    .y     (req.y),
    .op1   (req.op1),
    .op2   (req.op2),
    .busy  (div_busy),
    .ready (div_ready),
    .quot  (div_quot),
    .ovf   (div_ovf),
    .dbz   (div_dbz)
  );

  always_ff @(posedge clk) begin
    if (rst) unimpl_q <= 1'b0;
    else     unimpl_q <= (req.start_mul & ~mul_present) | (req.start_div & ~div_present);
  end

  always_comb begin
    rsp        = '0;
    rsp.unimpl = unimpl_q;
    if (mul_present) begin
      rsp.ready  = mul_ready;
      rsp.result = mul_prod;
    end else if (div_present) begin
      rsp.ready  = div_ready;
      rsp.busy   = div_busy;
      rsp.result = {32'h0, div_quot};
      rsp.ovf    = div_ovf;
      rsp.dbz    = div_dbz;
    end
  end

  // The integer unit issues at most one operation per cycle.
  a_one_start: assert property (@(posedge clk) disable iff (rst)
    !(req.start_mul && req.start_div));
endmodule
