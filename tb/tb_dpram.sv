// Self-checking test of the dual-port BRAM: writes through either port are
// read back through the other with one cycle of latency, the read port holds
// its data while disabled, and a reference array tracks the contents.
module tb_dpram;
  localparam int DEPTH = 512;
  logic clk = 1'b0;
  logic a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [8:0] a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, b_wdata = '0, a_rdata, b_rdata;
  logic [31:0] model [DEPTH];
  int checks = 0, failures = 0;

  dpram #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill through port A
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = 9'(k); a_wdata = $urandom; model[k] = a_wdata;
    end
    @(negedge clk); a_en = 0; a_we = 0;
    // read everything through port B
    for (int k = 0; k < DEPTH; k++) begin
      @(negedge clk); b_en = 1; b_addr = 9'(k);
      @(negedge clk); b_en = 0;
      checks++;
      if (b_rdata !== model[k]) begin failures++; $display("FAIL B read %0d", k); end
    end
    // random traffic on both ports at once, to different words
    for (int k = 0; k < 2000; k++) begin
      int aa, bb;
      aa = $urandom_range(0, DEPTH-1); bb = (aa + $urandom_range(1, DEPTH-1)) % DEPTH;
      @(negedge clk);
      a_en = 1; a_we = 1'($urandom); a_addr = 9'(aa); a_wdata = $urandom;
      b_en = 1; b_we = 1'($urandom); b_addr = 9'(bb); b_wdata = $urandom;
      begin
        logic [31:0] ea, eb;
        ea = model[aa]; eb = model[bb];
        if (a_we) model[aa] = a_wdata;
        if (b_we) model[bb] = b_wdata;
        @(negedge clk); a_en = 0; b_en = 0;
        checks += 2;
        if (a_rdata !== ea) begin failures++; $display("FAIL A %0d", aa); end
        if (b_rdata !== eb) begin failures++; $display("FAIL B %0d", bb); end
        @(negedge clk);
        checks++;
        if (a_rdata !== ea) begin failures++; $display("FAIL A hold"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
