// Self-checking test of the ICAP decoder with the dual-port BRAM on port A.
// Local-bus accesses below 0x800 must reach the BRAM, the size and offset
// registers must read back, a control write must start one transfer with the
// right direction, size and offset, be ignored while the transfer runs, and
// the status register must show busy and the sticky done bit.
module tb_icap_decoder;
  import pdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic lb_req = 0, lb_we = 0, lb_ack;
  logic [11:0] lb_addr = '0;
  logic [31:0] lb_wdata = '0, lb_rdata;
  logic a_en, a_we;
  logic [8:0] a_addr;
  logic [31:0] a_wdata, a_rdata, b_rdata;
  logic cmd_start;
  icap_cmd_t cmd;
  logic [9:0] xfer_size;
  logic [8:0] xfer_offset;
  logic fsm_busy = 0, fsm_done = 0;
  int checks = 0, failures = 0;

  icap_decoder #(.DEPTH(512)) dut (.*);
  dpram #(.DEPTH(512)) u_ram (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
    .b_en(1'b0), .b_we(1'b0), .b_addr(9'd0), .b_wdata(32'd0), .b_rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_start = 0; bit last_rb;
  always @(posedge clk) if (cmd_start) begin n_start++; last_rb = cmd.readback; end

  task automatic acc(bit wr, logic [11:0] a, logic [31:0] d, output logic [31:0] rd);
    @(negedge clk); lb_req = 1; lb_we = wr; lb_addr = a; lb_wdata = d;
    @(negedge clk); lb_req = 0;
    checks++;
    if (!lb_ack) begin failures++; $display("FAIL no ack"); end
    rd = lb_rdata;
  endtask

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] rd;
    logic [31:0] img [512];
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 512; k++) begin img[k] = $urandom; acc(1, 12'(k * 4), img[k], rd); end
    for (int k = 0; k < 512; k += 7) begin acc(0, 12'(k * 4), 0, rd); chk(rd, img[k], "bram"); end
    acc(1, REG_SIZE, 32'd300, rd);
    acc(1, REG_OFFSET, 32'd17, rd);
    acc(0, REG_SIZE, 0, rd);   chk(rd, 300, "size");
    acc(0, REG_OFFSET, 0, rd); chk(rd, 17, "offset");
    chk(32'(xfer_size), 300, "size out"); chk(32'(xfer_offset), 17, "offset out");
    acc(1, REG_CTRL, 32'd1, rd);
    @(negedge clk);
    chk(32'(n_start), 1, "one start"); chk(32'(last_rb), 1, "readback dir");
    fsm_busy = 1;
    acc(0, REG_STATUS, 0, rd); chk(rd, 32'h2, "status busy");
    acc(1, REG_CTRL, 32'd0, rd);
    acc(1, REG_SIZE, 32'd5, rd);
    chk(32'(n_start), 1, "ignored while busy"); chk(32'(xfer_size), 300, "size locked");
    @(negedge clk); fsm_done = 1; fsm_busy = 0;
    @(negedge clk); fsm_done = 0;
    acc(0, REG_STATUS, 0, rd); chk(rd, 32'h1, "status done");
    acc(0, REG_STATUS, 0, rd); chk(rd, 32'h1, "done sticky");
    acc(1, REG_CTRL, 32'd0, rd);
    @(negedge clk);
    chk(32'(n_start), 2, "second start"); chk(32'(last_rb), 0, "configure dir");
    fsm_busy = 1;
    acc(0, REG_STATUS, 0, rd); chk(rd, 32'h2, "done cleared by start");
    acc(0, REG_CTRL, 0, rd); chk(rd, 32'h0, "ctrl readback");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
