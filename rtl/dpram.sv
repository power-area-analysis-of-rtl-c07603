// Dual-port block RAM used as the ICAP wrapper's bitstream buffer.
//
// Port A belongs to the bus side (the ICAP decoder), port B to the ICAP side
// (address controller and ICAP controller). Data written towards ICAP and
// data read back from ICAP wait here until they are used. The document gives
// the role; the depth and width are this design's choice (one 512 x 32
// block RAM of the Virtex-4).
//
// Each port: `en` enables the access on the rising edge, `we` writes `wdata`
// at `addr`, a read returns the word on `rdata` after that edge (one cycle
// latency, read-first) and `rdata` holds its value while `en` is low. Both
// ports share one clock; when both write the same word in one cycle, port
// B's data is kept.
module dpram #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_en,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  output logic [WIDTH-1:0] a_rdata,
  input  logic             b_en,
  input  logic             b_we,
  input  logic [AW-1:0]    b_addr,
  input  logic [WIDTH-1:0] b_wdata,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      if (a_we) mem[a_addr] <= a_wdata;
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      if (b_we) mem[b_addr] <= b_wdata;
    end
  end
endmodule
