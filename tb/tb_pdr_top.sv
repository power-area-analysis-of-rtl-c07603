// End-to-end test of the reconfigurable Mul/Div system at its default sizes.
//
// The testbench plays the LEON3 software and integer unit on the APB and
// Mul/Div ports, and the ICAP primitive with the configuration memory
// (icap_model) on the ICAP port, whose `rm_id` output closes the loop into
// the reconfigurable region. The run follows the three test cases and the
// reconfiguration experiment of the design:
//   1. blank region: multiply and divide requests are refused (unimpl)
//   2. a 26 KiB divider partial bitstream is streamed through the 512-word
//      BRAM buffer; divisions are then checked, incl. overflow and /0
//   3. a 28 KiB multiplier partial bitstream replaces it; multiplications
//      are checked and divisions refused
//   4. one frame and ICAP's IDCODE register are read back and compared
//   5. a blank bitstream empties the region again
// Each mechanism (APB wait states, BRAM block reloads, ICAP busy stalls,
// readback, each kind of swap, unimpl, division overflow and divide by
// zero) is counted and must occur at least once. The cycle count of each
// reconfiguration is printed.
module tb_pdr_top;
  import pdr_pkg::*;
  import pdr_tb_pkg::*;
  localparam int DEPTH = 512;
  logic clk = 1'b0, rst_n = 1'b0;
  logic psel = 0, penable = 0, pwrite = 0, pready;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic icap_ce_n, icap_write_n, icap_busy;
  logic [31:0] icap_i, icap_o;
  rm_id_t rm_id;
  muldiv_req_t muldiv_req = '0;
  muldiv_rsp_t muldiv_rsp;
  int checks = 0, failures = 0;

  pdr_top dut (.*);
  icap_model u_icap (.clk, .ce_n(icap_ce_n), .write_n(icap_write_n),
    .i(icap_i), .o(icap_o), .busy(icap_busy), .rm_id);
  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_apb_wait = 0, n_chunks = 0, n_readback = 0, n_to_mul = 0, n_to_div = 0, n_to_blank = 0;
  int n_unimpl = 0, n_mul = 0, n_div = 0, n_ovf = 0, n_dbz = 0, n_bad_wait = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic apb(bit wr, logic [11:0] a, logic [31:0] wd, output logic [31:0] rd);
    int acc;
    @(negedge clk); psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = wd;
    @(negedge clk); penable = 1; acc = 1;
    while (!pready && acc < 50) begin @(negedge clk); acc++; end
    rd = prdata;
    if (acc == 4) n_apb_wait++; else n_bad_wait++;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic run_xfer(int n, bit readback);
    logic [31:0] rd;
    apb(1, REG_SIZE, 32'(n), rd);
    apb(1, REG_OFFSET, 0, rd);
    apb(1, REG_CTRL, 32'(readback), rd);
    do apb(0, REG_STATUS, 0, rd); while (!rd[STAT_DONE_BIT]);
    if (readback) n_readback++; else n_chunks++;
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

  task automatic reconfigure(logic [31:0] sig, int frames, int words, rm_id_t exp, string name);
    logic [31:0] q[$];
    longint t0;
    int c0;
    build_partial(q, sig, frames, words);
    c0 = n_chunks;
    t0 = cyc;
    send(q);
    $display("reconfiguration to %s: %0d words, %0d buffer loads, %0d cycles",
             name, q.size(), n_chunks - c0, cyc - t0);
    check(rm_id == exp, {"region holds ", name});
    if (rm_id == exp && exp == RM_MUL) n_to_mul++;
    if (rm_id == exp && exp == RM_DIV) n_to_div++;
    if (rm_id == exp && exp == RM_BLANK) n_to_blank++;
  endtask

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // one Mul/Div operation from the integer unit; returns cycles and response
  task automatic op(bit mul, bit s, logic [31:0] yy, logic [31:0] a, logic [31:0] b,
                    output int lat, output muldiv_rsp_t r);
    @(negedge clk);
    muldiv_req = '0; muldiv_req.start_mul = mul; muldiv_req.start_div = !mul;
    muldiv_req.sgn = s; muldiv_req.y = yy; muldiv_req.op1 = a; muldiv_req.op2 = b;
    @(posedge clk); #1 muldiv_req.start_mul = 1'b0; muldiv_req.start_div = 1'b0; lat = 1;
    while (!muldiv_rsp.ready && !muldiv_rsp.unimpl && lat < 60) begin @(posedge clk); #1 lat++; end
    r = muldiv_rsp;
    if (r.unimpl) n_unimpl++;
  endtask

  initial begin
    int lat; muldiv_rsp_t r; logic [31:0] rd; logic [31:0] q[$];
    repeat (4) @(negedge clk);
    rst_n = 1'b1;

    // 1. empty region
    check(rm_id == RM_BLANK, "starts blank");
    op(1, 0, 0, 32'd6, 32'd7, lat, r);  check(r.unimpl && !r.ready, "blank: mul refused");
    op(0, 0, 0, 32'd42, 32'd7, lat, r); check(r.unimpl && !r.ready, "blank: div refused");

    // 2. divider, 26 KiB = 6656 words, 162 frames of 41 words
    reconfigure(SIG_DIV, 162, 6656, RM_DIV, "divider");
    op(0, 0, 32'h0, 32'd1000, 32'd7, lat, r);
    check(r.ready && lat == 36 && r.result[31:0] == 32'd142, "udiv 1000/7 in 36 cycles"); n_div++;
    op(0, 1, 32'hFFFF_FFFF, 32'hFFFF_FC18, 32'd7, lat, r);
    check(r.ready && r.result[31:0] == 32'hFFFF_FF72, "sdiv -1000/7 = -142"); n_div++;
    op(0, 0, 32'h0000_0007, 32'h0, 32'd7, lat, r);
    check(r.ready && r.ovf && r.result[31:0] == 32'hFFFF_FFFF, "udiv overflow saturates");
    if (r.ovf) n_ovf++;
    op(0, 1, 32'h0, 32'd5, 32'd0, lat, r);
    check(r.ready && r.dbz, "divide by zero flagged");
    if (r.dbz) n_dbz++;
    op(1, 0, 0, 32'd6, 32'd7, lat, r);  check(r.unimpl, "divider loaded: mul refused");

    // 3. multiplier, 28 KiB = 7168 words, 174 frames of 41 words
    reconfigure(SIG_MUL, 174, 7168, RM_MUL, "multiplier");
    op(1, 1, 0, 32'hFFFF_FFF9, 32'd6, lat, r);
    check(r.ready && lat == 1 && r.result == 64'hFFFF_FFFF_FFFF_FFD6, "smul -7*6 in 1 cycle"); n_mul++;
    op(1, 0, 0, 32'hFFFF_FFFF, 32'hFFFF_FFFF, lat, r);
    check(r.ready && r.result == 64'hFFFF_FFFE_0000_0001, "umul max*max"); n_mul++;
    op(0, 0, 0, 32'd42, 32'd7, lat, r); check(r.unimpl, "multiplier loaded: div refused");

    // 4. read back frame 3 of the region
    build_readback_cmd(q, 3, FRAME_WORDS);
    send(q);
    run_xfer(FRAME_WORDS, 1'b1);
    for (int k = 0; k < FRAME_WORDS; k++) begin
      apb(0, 12'(k * 4), 0, rd);
      check(rd == frame_word(SIG_MUL, 3 * FRAME_WORDS + k), "readback word");
    end
    build_desync(q);
    send(q);
    check(rm_id == RM_MUL, "multiplier kept after readback");
    build_reg_read(q, R_IDCODE);
    send(q);
    run_xfer(1, 1'b1);
    apb(0, 12'h000, 0, rd);
    check(rd == u_icap.IDCODE, "ICAP IDCODE register read back");
    build_desync(q);
    send(q);

    // 5. blank bitstream over the same 174 frames
    reconfigure(32'h0, 174, 7168, RM_BLANK, "blank");
    op(1, 0, 0, 32'd6, 32'd7, lat, r); check(r.unimpl, "blank again: mul refused");

    $display("mechanisms: apb_wait=%0d buffer_loads=%0d icap_stall=%0d readback=%0d to_div=%0d to_mul=%0d to_blank=%0d unimpl=%0d mul=%0d div=%0d ovf=%0d dbz=%0d",
             n_apb_wait, n_chunks, u_icap.stall_cycles, n_readback, n_to_div, n_to_mul, n_to_blank,
             n_unimpl, n_mul, n_div, n_ovf, n_dbz);
    check(n_bad_wait == 0, "every APB access took 4 access cycles");
    check(n_apb_wait > 0, "APB wait states happened");
    check(n_chunks > 14, "BRAM buffer reloaded within a bitstream");
    check(u_icap.stall_cycles > 0, "ICAP busy stalls happened");
    check(n_readback > 0, "readback happened");
    check(n_to_div > 0 && n_to_mul > 0 && n_to_blank > 0, "every swap happened");
    check(n_unimpl > 0 && n_mul > 0 && n_div > 0 && n_ovf > 0 && n_dbz > 0, "every Mul/Div case happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
