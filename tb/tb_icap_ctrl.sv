// Self-checking test of the ICAP controller. The testbench holds a BRAM
// image and an ICAP stand-in with random busy cycles. Writes: every word of
// the BRAM must reach `icap_i` exactly once, in order, and only on cycles
// where ICAP is not busy. Reads: every word ICAP offers must land in the
// BRAM through port B.
module tb_icap_ctrl;
  import pdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0, write = 1'b0, done;
  logic b_en, b_we;
  logic [31:0] b_wdata, b_rdata = '0;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i, icap_o;
  int checks = 0, failures = 0;

  icap_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] bram [64];
  int addr = 0;
  logic [31:0] got [$];
  logic [31:0] src [64];
  int rd_idx = 0, n_stall = 0;
  logic busy_r = 1'b0;
  assign icap_busy = busy_r;
  assign icap_o = src[rd_idx % 64];

  always @(posedge clk) begin
    if (b_en) begin
      b_rdata <= bram[addr];
      if (b_we) bram[addr] <= b_wdata;
    end
    if (!icap_ce_n && icap_busy) n_stall++;
    if (!icap_ce_n && !icap_busy) begin
      if (!icap_write_n) got.push_back(icap_i);
      else rd_idx <= rd_idx + 1;
    end
    busy_r <= ($urandom_range(0, 2) == 0);
  end

  task automatic word(bit wr);
    int cyc = 0;
    @(negedge clk); start = 1'b1; write = wr;
    @(negedge clk); start = 1'b0;
    while (!done && cyc < 100) begin @(negedge clk); cyc++; end
    @(negedge clk);
    addr++;
  endtask

  initial begin
    foreach (bram[k]) bram[k] = $urandom;
    foreach (src[k])  src[k]  = $urandom;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 32; k++) word(1'b1);
    checks++;
    if (got.size() != 32) begin failures++; $display("FAIL %0d words written", got.size()); end
    for (int k = 0; k < 32 && k < got.size(); k++) begin
      checks++;
      if (got[k] !== bram[k]) begin failures++; $display("FAIL word %0d", k); end
    end
    addr = 32;
    for (int k = 0; k < 32; k++) word(1'b0);
    for (int k = 0; k < 32; k++) begin
      checks++;
      if (bram[32 + k] !== src[k]) begin failures++; $display("FAIL readback %0d", k); end
    end
    checks++;
    if (rd_idx != 32 || n_stall == 0) begin failures++; $display("FAIL rd=%0d stalls=%0d", rd_idx, n_stall); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
