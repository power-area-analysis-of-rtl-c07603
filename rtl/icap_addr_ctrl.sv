// Address controller of the ICAP wrapper.
//
// Generates the ICAP-side (port B) BRAM address of a transfer and counts the
// words still to move. The document says it steers the flow of data between
// BRAM and ICAP; the counter structure is this design's choice.
//
// `load` takes the start offset and the word count; each `inc` moves to the
// next word (wrapping at the end of the BRAM) and decrements the count.
// `empty` is high when no word is left, `last` when exactly one is. Both
// act on the rising edge; synchronous reset, active high.
module icap_addr_ctrl #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [AW-1:0] offset,
  input  logic [AW:0]   size,
  input  logic          inc,
  output logic [AW-1:0] addr,
  output logic          last,
  output logic          empty
);
  logic [AW:0] remaining;

  always_ff @(posedge clk) begin
    if (rst) begin
      addr      <= '0;
      remaining <= '0;
    end else if (load) begin
      addr      <= offset;
      remaining <= size;
    end else if (inc && remaining != '0) begin
      addr      <= addr + 1'b1;
      remaining <= remaining - 1'b1;
    end
  end

  assign last  = (remaining == (AW+1)'(1));
  assign empty = (remaining == '0);
endmodule
