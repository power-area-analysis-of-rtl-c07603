// 32x32-bit multiplier with a 64-bit product and one cycle of latency.
//
// This is the multiplier module that is loaded into the reconfigurable
// region. The document fixes its function: two 32-bit operands, signed or
// unsigned, a 64-bit result, one clock cycle of latency. How it is built is
// this design's choice: both operands are extended by one bit (sign or zero)
// and a single 33x33 signed multiply is registered.
//
// Interface: `start` is sampled with `sgn`, `op1`, `op2` on a rising edge;
// on the next edge `prod` holds the product and `ready` is high for one
// cycle. A new operation may start every cycle. `rst` is synchronous and
// active high.
module mul32 (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        sgn,
  input  logic [31:0] op1,
  input  logic [31:0] op2,
  output logic        ready,
  output logic [63:0] prod
);
  logic signed [32:0] a, b;
  logic signed [65:0] p;

  always_comb begin
    a = {sgn & op1[31], op1};
    b = {sgn & op2[31], op2};
    p = a * b;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      ready <= 1'b0;
      prod  <= '0;
    end else begin
      ready <= start;
      if (start) prod <= p[63:0];
    end
  end
endmodule
