// Self-checking test of the ICAP state machine. The testbench plays the
// address controller (a word counter) and the ICAP controller (answers each
// request after a random delay) and checks that a transfer of N words issues
// exactly N word requests in the commanded direction, steps the address once
// per word, reports busy throughout and ends with one `done` pulse.
module tb_icap_fsm;
  import pdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  icap_cmd_t cmd = '0;
  logic ac_load, ac_inc, ac_last, ac_empty, ic_start, ic_write, busy, done;
  logic ic_done = 1'b0;
  int remaining = 0;
  int checks = 0, failures = 0;

  icap_fsm dut (.*);
  always #5 clk = ~clk;

  assign ac_last  = (remaining == 1);
  assign ac_empty = (remaining == 0);

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_start, n_inc, n_done, n_wrong_dir, load_size;
  bit exp_write;
  // ICAP controller stand-in: done 1..4 cycles after each start
  always @(posedge clk) begin
    if (ac_load) remaining <= load_size;
    else if (ac_inc) remaining <= remaining - 1;
    if (ic_start) begin
      n_start++;
      if (ic_write !== exp_write) n_wrong_dir++;
      fork begin
        repeat ($urandom_range(0, 3)) @(negedge clk);
        @(negedge clk); ic_done = 1'b1;
        @(negedge clk); ic_done = 1'b0;
      end join_none
    end
    if (ac_inc) n_inc++;
    if (done) n_done++;
  end

  task automatic xfer(int n, bit readback);
    int cyc;
    n_start = 0; n_inc = 0; n_done = 0; n_wrong_dir = 0;
    load_size = n; exp_write = !readback;
    @(negedge clk); start = 1'b1; cmd.readback = readback;
    @(negedge clk); start = 1'b0;
    cyc = 0;
    while (!done && cyc < 2000) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low during transfer"); end
      @(negedge clk); cyc++;
    end
    @(negedge clk);
    checks++;
    if (n_start != n || n_inc != n || n_done != 1 || n_wrong_dir != 0 || busy) begin
      failures++;
      $display("FAIL n=%0d starts=%0d incs=%0d dones=%0d wrongdir=%0d", n, n_start, n_inc, n_done, n_wrong_dir);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    xfer(1, 0);
    xfer(5, 1);
    xfer(0, 0);
    xfer(41, 0);
    for (int k = 0; k < 10; k++) xfer($urandom_range(1, 100), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
