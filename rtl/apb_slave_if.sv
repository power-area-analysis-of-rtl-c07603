// APB slave interface of the ICAP hardware system.
//
// Bridges the APB bus of the LEON3 system to the wrapper's internal local
// bus. The document states that the ICAP hardware system needs 4 clock
// cycles for a read or write and that APB was made to wait for it; this
// block implements that wait with a `pready` signal (the wait-state handshake
// of later APB revisions), which is this design's choice of mechanism.
//
// Timing: the setup phase (psel=1, penable=0) is sampled on an edge; in the
// next cycle a one-cycle `lb_req` carries address, direction and write data
// to the ICAP decoder, which answers with a one-cycle `lb_ack` and read data.
// `pready` is high in the ACCESS_CYCLES-th cycle of the access phase, so a
// transfer takes one setup cycle plus ACCESS_CYCLES access cycles. `prdata`
// is valid while `pready` is high. `rst` is synchronous, active high.
module apb_slave_if
  import pdr_pkg::*;
#(
  parameter int unsigned ACCESS_CYCLES = 4   // must be at least 3
) (
  input  logic               clk,
  input  logic               rst,
  // APB
  input  logic               psel,
  input  logic               penable,
  input  logic               pwrite,
  input  logic [PADDR_W-1:0] paddr,
  input  logic [DATA_W-1:0]  pwdata,
  output logic [DATA_W-1:0]  prdata,
  output logic               pready,
  // local bus to the ICAP decoder
  output logic               lb_req,
  output logic               lb_we,
  output logic [PADDR_W-1:0] lb_addr,
  output logic [DATA_W-1:0]  lb_wdata,
  input  logic               lb_ack,
  input  logic [DATA_W-1:0]  lb_rdata
);
  logic       active;
  logic [3:0] cnt;
  logic       acked;

  always_ff @(posedge clk) begin
    if (rst) begin
      active   <= 1'b0;
      cnt      <= '0;
      acked    <= 1'b0;
      lb_req   <= 1'b0;
      lb_we    <= 1'b0;
      lb_addr  <= '0;
      lb_wdata <= '0;
      prdata   <= '0;
    end else begin
      lb_req <= 1'b0;
      if (!active) begin
        if (psel && !penable) begin
          active   <= 1'b1;
          cnt      <= 4'd1;
          acked    <= 1'b0;
          lb_req   <= 1'b1;
          lb_we    <= pwrite;
          lb_addr  <= paddr;
          lb_wdata <= pwdata;
        end
      end else begin
        if (lb_ack) begin
          acked  <= 1'b1;
          prdata <= lb_rdata;
        end
        if (pready) active <= 1'b0;
        else if (cnt < 4'(ACCESS_CYCLES)) cnt <= cnt + 4'd1;
      end
    end
  end

  assign pready = active && acked && (cnt == 4'(ACCESS_CYCLES));

  // APB rules: the access phase follows a setup phase of the same transfer
  // and the address stays stable until the slave is ready.
  a_enable_needs_sel: assert property (@(posedge clk) disable iff (rst)
    penable |-> psel);
  a_addr_stable: assert property (@(posedge clk) disable iff (rst)
    (psel && penable && !pready) |=> (paddr == $past(paddr) && pwrite == $past(pwrite)));
endmodule
