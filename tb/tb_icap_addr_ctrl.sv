// Self-checking test of the address controller: load, stepping, wrap at the
// end of the BRAM, the `last` and `empty` flags, and no step past empty.
module tb_icap_addr_ctrl;
  logic clk = 1'b0, rst = 1'b1, load = 0, inc = 0;
  logic [8:0] offset = '0, addr;
  logic [9:0] size = '0;
  logic last, empty;
  int checks = 0, failures = 0;

  icap_addr_ctrl #(.DEPTH(512)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int off, int n);
    @(negedge clk); load = 1; offset = 9'(off); size = 10'(n);
    @(negedge clk); load = 0;
    for (int k = 0; k < n; k++) begin
      checks++;
      if (addr !== 9'((off + k) % 512) || empty || (last !== (k == n - 1))) begin
        failures++; $display("FAIL off=%0d k=%0d addr=%0d last=%0d", off, k, addr, last);
      end
      inc = 1; @(negedge clk); inc = 0;
    end
    checks++;
    if (!empty || last) begin failures++; $display("FAIL not empty at end"); end
    inc = 1; @(negedge clk); inc = 0;
    checks++;
    if (!empty || addr !== 9'((off + n) % 512)) begin failures++; $display("FAIL stepped past empty"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    run(0, 5);
    run(500, 20);
    run(3, 512);
    run(100, 0);
    for (int k = 0; k < 10; k++) run($urandom_range(0, 511), $urandom_range(1, 60));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
