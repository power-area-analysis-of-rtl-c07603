// Self-checking test of the reconfigurable Mul/Div region: blank region
// answers every request with `unimpl`; with the multiplier loaded products
// arrive after one cycle and divisions are refused; with the divider loaded
// quotients arrive after 36 cycles and multiplications are refused; a swap
// in the middle of a division aborts it.
module tb_muldiv_rp;
  import pdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  rm_id_t rm_id = RM_BLANK;
  muldiv_req_t req = '0;
  muldiv_rsp_t rsp;
  int checks = 0, failures = 0;

  muldiv_rp dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // issue one request; return cycles until ready or unimpl, and the response
  task automatic issue(bit mul, bit s, logic [31:0] yy, logic [31:0] a, logic [31:0] b,
                       output int cyc, output muldiv_rsp_t r);
    @(negedge clk);
    req = '0; req.start_mul = mul; req.start_div = !mul; req.sgn = s;
    req.y = yy; req.op1 = a; req.op2 = b;
    @(posedge clk); #1 req.start_mul = 1'b0; req.start_div = 1'b0; cyc = 1;
    while (!rsp.ready && !rsp.unimpl && cyc < 60) begin @(posedge clk); #1 cyc++; end
    r = rsp;
  endtask

  int cyc; muldiv_rsp_t r;
  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // test case 1: empty region
    issue(1, 0, 0, 32'd3, 32'd4, cyc, r);
    check(r.unimpl && !r.ready && cyc == 1, "blank mul -> unimpl");
    issue(0, 0, 0, 32'd12, 32'd4, cyc, r);
    check(r.unimpl && !r.ready && cyc == 1, "blank div -> unimpl");
    // test case 2: multiplier loaded
    rm_id = RM_MUL;
    issue(1, 1, 0, 32'hFFFF_FFFD, 32'd7, cyc, r);
    check(r.ready && cyc == 1 && r.result == 64'hFFFF_FFFF_FFFF_FFEB, "mul -3*7");
    issue(1, 0, 0, 32'hFFFF_FFFF, 32'h2, cyc, r);
    check(r.ready && r.result == 64'h1_FFFF_FFFE, "mul unsigned");
    issue(0, 0, 0, 32'd12, 32'd4, cyc, r);
    check(r.unimpl && !r.ready, "div with mul loaded -> unimpl");
    // test case 3: divider loaded
    rm_id = RM_DIV;
    issue(0, 0, 32'h1, 32'h0, 32'h10, cyc, r);
    check(r.ready && cyc == 36 && r.result == 64'h1000_0000, "div 2^32/16");
    issue(0, 1, 32'hFFFF_FFFF, 32'hFFFF_FF9C, 32'd10, cyc, r);
    check(r.ready && r.result[31:0] == 32'hFFFF_FFF6, "div -100/10");
    issue(0, 0, 32'h0, 32'd9, 32'd0, cyc, r);
    check(r.ready && r.dbz, "div by zero flag");
    issue(0, 0, 32'h20, 32'd0, 32'd16, cyc, r);
    check(r.ready && r.ovf && r.result[31:0] == 32'hFFFF_FFFF, "div overflow");
    issue(1, 0, 0, 32'd3, 32'd4, cyc, r);
    check(r.unimpl, "mul with div loaded -> unimpl");
    // swap while a division runs: the division is abandoned
    @(negedge clk); req = '0; req.start_div = 1'b1; req.op1 = 32'd100; req.op2 = 32'd3;
    @(negedge clk); req.start_div = 1'b0;
    repeat (5) @(negedge clk);
    check(rsp.busy, "division in progress");
    rm_id = RM_BLANK;
    @(negedge clk); rm_id = RM_DIV;
    repeat (45) begin
      @(negedge clk);
      if (rsp.ready) begin failures++; $display("FAIL ready after swap"); end
    end
    check(!rsp.busy, "aborted division idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
