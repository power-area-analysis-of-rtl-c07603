// Self-checking test of the 64/32 divider: unsigned and signed division,
// overflow saturation, division by zero, and the 36-cycle latency. The
// reference quotient comes from the simulator's own 64-bit arithmetic.
module tb_div64;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, sgn = 1'b0;
  logic [31:0] y = '0, op1 = '0, op2 = '0;
  logic busy, ready, ovf, dbz;
  logic [31:0] quot;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_dbz = 0;

  div64 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: exact quotient, truncated toward zero, saturated to 32 bits.
  task automatic ref_div(input logic s, input logic [63:0] n, input logic [31:0] d,
                         output logic [31:0] q, output logic o, output logic z);
    o = 1'b0; z = 1'b0; q = '0;
    if (d == 0) begin z = 1'b1; return; end
    if (!s) begin
      logic [63:0] uq;
      uq = n / {32'h0, d};
      if (uq > 64'hFFFF_FFFF) begin o = 1'b1; q = 32'hFFFF_FFFF; end
      else q = uq[31:0];
    end else begin
      logic neg;
      logic [63:0] mn, md, mq;
      neg = n[63] ^ d[31];
      mn = n[63] ? -n : n;
      md = d[31] ? {32'h0, -d} : {32'h0, d};
      mq = mn / md;
      if (neg) begin
        if (mq > 64'h8000_0000) begin o = 1'b1; q = 32'h8000_0000; end
        else q = -mq[31:0];
      end else begin
        if (mq > 64'h7FFF_FFFF) begin o = 1'b1; q = 32'h7FFF_FFFF; end
        else q = mq[31:0];
      end
    end
  endtask

  task automatic one(logic s, logic [63:0] n, logic [31:0] d);
    logic [31:0] eq; logic eo, ez; int cyc;
    ref_div(s, n, d, eq, eo, ez);
    @(negedge clk); start = 1'b1; sgn = s; y = n[63:32]; op1 = n[31:0]; op2 = d;
    @(posedge clk); #1 start = 1'b0; cyc = 1;
    while (!ready && cyc < 100) begin @(posedge clk); #1 cyc++; end
    checks++;
    if (cyc != 36) begin failures++; $display("FAIL latency %0d", cyc); end
    checks++;
    if (quot !== eq || ovf !== eo || dbz !== ez) begin
      failures++;
      $display("FAIL s=%0d %h / %h got %h o%0d z%0d exp %h o%0d z%0d", s, n, d, quot, ovf, dbz, eq, eo, ez);
    end
    if (eo) n_ovf++;
    if (ez) n_dbz++;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    one(0, 64'd100, 32'd7);
    one(1, -64'sd100, 32'd7);
    one(1, 64'd100, -32'sd7);
    one(1, -64'sd100, -32'sd7);
    one(0, 64'hFFFF_FFFE_FFFF_FFFF, 32'hFFFF_FFFF);
    one(0, 64'h1_0000_0000, 32'h1);              // unsigned overflow
    one(1, 64'h0000_0000_8000_0000, 32'h1);      // +2^31: signed overflow
    one(1, -64'sh8000_0000, 32'h1);              // -2^31 fits
    one(1, -64'sh8000_0001, 32'h1);              // negative overflow
    one(1, 64'h8000_0000_0000_0000, 32'hFFFF_FFFF);
    one(0, 64'd5, 32'd0);                        // divide by zero
    one(1, 64'd0, 32'h8000_0000);
    for (int k = 0; k < 300; k++) begin
      logic [63:0] n; logic [31:0] d;
      n = {$urandom, $urandom};
      d = $urandom;
      if (k % 3 == 0) n[63:32] = $urandom_range(0, 3) == 0 ? n[63:32] : {{20{n[63]}}, n[43:32]};
      if (k % 5 == 0) n = {{32{n[31]}}, n[31:0]};
      one(1'(k), n, d);
    end
    checks++;
    if (n_ovf == 0 || n_dbz == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
