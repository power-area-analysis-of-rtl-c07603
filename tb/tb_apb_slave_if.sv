// Self-checking test of the APB slave interface. The testbench is the APB
// master and also answers the local bus from a small register array. Each
// transfer must pass address, direction and data through one local-bus
// request and must take exactly one setup cycle plus four access cycles.
module tb_apb_slave_if;
  import pdr_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic psel = 0, penable = 0, pwrite = 0, pready;
  logic [11:0] paddr = '0;
  logic [31:0] pwdata = '0, prdata;
  logic lb_req, lb_we, lb_ack = 1'b0;
  logic [11:0] lb_addr;
  logic [31:0] lb_wdata, lb_rdata = '0;
  int checks = 0, failures = 0;

  apb_slave_if dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] regs [1024];
  int n_req = 0;
  always @(posedge clk) begin
    lb_ack <= lb_req;
    if (lb_req) begin
      n_req++;
      if (lb_we) regs[lb_addr[11:2]] <= lb_wdata;
      lb_rdata <= regs[lb_addr[11:2]];
    end
  end

  task automatic apb(bit wr, logic [11:0] a, logic [31:0] wd, output logic [31:0] rd, output int acc);
    @(negedge clk); psel = 1; penable = 0; pwrite = wr; paddr = a; pwdata = wd;
    @(negedge clk); penable = 1; acc = 1;
    while (!pready && acc < 20) begin @(negedge clk); acc++; end
    rd = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  initial begin
    logic [31:0] rd; int acc, n0;
    logic [31:0] shadow [1024];
    foreach (regs[k]) begin regs[k] = '0; shadow[k] = '0; end
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int k = 0; k < 200; k++) begin
      bit wr; logic [11:0] a; logic [31:0] d;
      wr = 1'($urandom); a = 12'($urandom) & 12'hFFC; d = $urandom;
      n0 = n_req;
      apb(wr, a, d, rd, acc);
      checks++;
      if (acc != 4) begin failures++; $display("FAIL access cycles %0d", acc); end
      checks++;
      if (n_req != n0 + 1) begin failures++; $display("FAIL requests %0d", n_req - n0); end
      if (!wr) begin
        checks++;
        if (rd !== shadow[a[11:2]]) begin failures++; $display("FAIL read %h: %h exp %h", a, rd, shadow[a[11:2]]); end
      end else shadow[a[11:2]] = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
