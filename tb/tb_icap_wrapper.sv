// Self-checking test of the ICAP wrapper with an ICAP model behind it and a
// small BRAM (64 words) so that a bitstream needs many buffer loads. The
// testbench acts as the processor's driver software over APB: it copies a
// partial bitstream block by block into the BRAM, starts configure
// transfers, polls the status register, and then reads part of the region
// back through a readback transfer. Checked: every APB access takes four
// access cycles, the model's configuration memory holds the frames, the
// region reports the loaded module, and readback returns the frame words
// and the value of ICAP's IDCODE register.
module tb_icap_wrapper;
  import pdr_pkg::*;
  import pdr_tb_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 1'b0, rst = 1'b1;
  logic psel = 0, penable = 0, pwrite = 0, pready;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i, icap_o;
  rm_id_t rm_id;
  int checks = 0, failures = 0;
  int n_apb = 0, n_bad_wait = 0;

  icap_wrapper #(.DEPTH(DEPTH)) dut (.*);
  icap_model #(.REGION_FRAMES(8)) u_icap (.clk, .ce_n(icap_ce_n), .write_n(icap_write_n),
    .i(icap_i), .o(icap_o), .busy(icap_busy), .rm_id);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apb(bit wr, logic [11:0] a, logic [31:0] wd, output logic [31:0] rd);
    int acc;
    @(negedge clk); psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = wd;
    @(negedge clk); penable = 1; acc = 1;
    while (!pready && acc < 50) begin @(negedge clk); acc++; end
    rd = prdata; n_apb++;
    if (acc != 4) n_bad_wait++;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic run_xfer(int n, bit readback);
    logic [31:0] rd;
    apb(1, REG_SIZE, 32'(n), rd);
    apb(1, REG_OFFSET, 0, rd);
    apb(1, REG_CTRL, 32'(readback), rd);
    do apb(0, REG_STATUS, 0, rd); while (!rd[STAT_DONE_BIT]);
  endtask

  task automatic send(ref logic [31:0] q[$]);
    logic [31:0] rd;
    for (int base = 0; base < q.size(); base += DEPTH) begin
      int n;
      n = (q.size() - base < DEPTH) ? q.size() - base : DEPTH;
      for (int k = 0; k < n; k++) apb(1, 12'(k * 4), q[base + k], rd);
      run_xfer(n, 1'b0);
    end
  endtask

  initial begin
    logic [31:0] q[$];
    logic [31:0] rd;
    int w0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    // partial bitstream of the divider: 5 frames
    build_partial(q, SIG_DIV, 5, 5 * FRAME_WORDS + 10);
    w0 = u_icap.wr_words;
    send(q);
    checks++;
    if (u_icap.wr_words - w0 != q.size()) begin failures++; $display("FAIL %0d words reached ICAP", u_icap.wr_words - w0); end
    checks++;
    if (rm_id != RM_DIV) begin failures++; $display("FAIL region not divider"); end
    for (int k = 0; k < 5 * FRAME_WORDS; k++) begin
      checks++;
      if (u_icap.cfg[k] !== frame_word(SIG_DIV, k)) begin failures++; $display("FAIL cfg %0d", k); end
    end
    // readback of 50 words starting at frame 1
    build_readback_cmd(q, 1, 50);
    send(q);
    run_xfer(50, 1'b1);
    for (int k = 0; k < 50; k++) begin
      apb(0, 12'(k * 4), 0, rd);
      checks++;
      if (rd !== frame_word(SIG_DIV, FRAME_WORDS + k)) begin failures++; $display("FAIL readback %0d: %h", k, rd); end
    end
    build_desync(q);
    send(q);
    // read ICAP's IDCODE register
    build_reg_read(q, R_IDCODE);
    send(q);
    run_xfer(1, 1'b1);
    apb(0, 12'h000, 0, rd);
    checks++;
    if (rd !== u_icap.IDCODE) begin failures++; $display("FAIL idcode %h", rd); end
    build_desync(q);
    send(q);
    checks++;
    if (n_bad_wait != 0 || u_icap.stall_cycles == 0 || u_icap.rd_words != 51) begin
      failures++;
      $display("FAIL waits=%0d stalls=%0d rd=%0d", n_bad_wait, u_icap.stall_cycles, u_icap.rd_words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
