// Self-checking test of the 32x32 multiplier: corner and random operands,
// signed and unsigned, back-to-back starts, and the one-cycle latency.
module tb_mul32;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, sgn = 1'b0, ready;
  logic [31:0] op1 = '0, op2 = '0;
  logic [63:0] prod;
  int checks = 0, failures = 0;

  mul32 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [63:0] ref_mul(logic s, logic [31:0] a, logic [31:0] b);
    longint sa, sb;
    if (s) begin sa = longint'($signed(a)); sb = longint'($signed(b)); end
    else   begin sa = longint'({32'h0, a}); sb = longint'({32'h0, b}); end
    return 64'(sa * sb);
  endfunction

  task automatic one(logic s, logic [31:0] a, logic [31:0] b);
    logic [63:0] exp;
    exp = ref_mul(s, a, b);
    @(negedge clk); start = 1'b1; sgn = s; op1 = a; op2 = b;
    @(negedge clk); start = 1'b0;
    checks++;
    if (!ready || prod !== exp) begin
      failures++;
      $display("FAIL s=%0d %h*%h got %h ready=%0d exp %h", s, a, b, prod, ready, exp);
    end
    @(negedge clk);
    checks++;
    if (ready) begin failures++; $display("FAIL ready held"); end
  endtask

  logic [31:0] corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h1234_5678};

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    foreach (corners[x]) foreach (corners[y]) begin
      one(1'b0, corners[x], corners[y]);
      one(1'b1, corners[x], corners[y]);
    end
    repeat (500) one(1'($urandom), $urandom, $urandom);
    // back-to-back: a new start every cycle, result one cycle later
    @(negedge clk);
    for (int k = 0; k < 20; k++) begin
      logic [63:0] exp;
      start = 1'b1; sgn = k[0]; op1 = 32'(k * 32'h0101_0101 + 7); op2 = 32'hF000_0000 - 32'(k);
      exp = ref_mul(sgn, op1, op2);
      @(negedge clk);
      checks++;
      if (!ready || prod !== exp) begin failures++; $display("FAIL back-to-back %0d", k); end
    end
    start = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
