// Behavioural model of the ICAP primitive and of the configuration memory
// of the reconfigurable region, for simulation only.
//
// It understands a reduced Virtex-4 style packet stream: dummy words until
// the sync word 0xAA995566; type-1 headers ([31:29]=001, op [28:27] with
// 10 = write and 01 = read, register [17:13], word count [10:0]) and type-2
// headers ([31:29]=010, op [28:27], word count [26:0]) that continue the
// last type-1 register. Registers: FAR (1) selects the first frame, FDRI
// (2) writes frame data, FDRO (3) reads frame data back, CMD (4) with value
// 0x0D (DESYNC) ends the stream. A read of any other register returns its
// value: FAR, IDCODE (12), otherwise 0. On DESYNC the model reports through `rm_id`
// which module the region now holds, from the region's first word:
// 0x4D554C00 multiplier, 0x44495600 divider, anything else blank.
//
// Port timing: a word passes on a rising edge where `ce_n` is low and `busy`
// is low. After every BUSY_PERIOD-th word the next write attempt
// sees one busy cycle; each read word is preceded by READ_LAT busy cycles.
module icap_model
  import pdr_pkg::*;
#(
  parameter int unsigned FRAME_WORDS   = 41,
  parameter int unsigned REGION_FRAMES = 180,
  parameter int unsigned BUSY_PERIOD   = 7,
  parameter int unsigned READ_LAT      = 2,
  parameter logic [31:0] IDCODE        = 32'h0165_8093  // any fixed value
) (
  input  logic        clk,
  input  logic        ce_n,
  input  logic        write_n,
  input  logic [31:0] i,
  output logic [31:0] o,
  output logic        busy,
  output rm_id_t      rm_id
);
  localparam int unsigned WORDS = FRAME_WORDS * REGION_FRAMES;
  localparam logic [31:0] SIG_MUL = 32'h4D55_4C00;
  localparam logic [31:0] SIG_DIV = 32'h4449_5600;

  logic [31:0] cfg [WORDS];
  logic        synced = 1'b0;
  logic [4:0]  cur_reg = '0;
  logic [26:0] wr_left = '0;
  logic [26:0] rd_left = '0;
  logic [31:0] far = '0;
  int unsigned wptr = 0, rptr = 0;
  int unsigned wr_words = 0, rd_words = 0, stall_cycles = 0, desyncs = 0;
  logic        stall = 1'b0;
  int unsigned rd_cnt = 0;
  logic        reading;
  logic        rd_is_reg = 1'b0;
  logic [4:0]  rd_reg = '0;
  logic [31:0] reg_val;

  initial begin
    rm_id = RM_BLANK;
    foreach (cfg[k]) cfg[k] = '0;
  end

  assign reading = !ce_n && write_n;
  assign busy    = (!ce_n && !write_n && stall) || (reading && rd_cnt < READ_LAT);
  assign reg_val = (rd_reg == 5'd1) ? far : (rd_reg == 5'd12) ? IDCODE : 32'h0;
  assign o       = !(reading && rd_cnt >= READ_LAT) ? 32'h0 :
                   rd_is_reg ? reg_val :
                   (rptr < WORDS) ? cfg[rptr] : 32'h0;

  always @(posedge clk) begin
    if (!ce_n && busy) stall_cycles <= stall_cycles + 1;
    if (!ce_n && !write_n && busy) stall <= 1'b0;
    if (!ce_n && !write_n && !busy) begin
      wr_words <= wr_words + 1;
      if (BUSY_PERIOD != 0 && (wr_words + 1) % BUSY_PERIOD == 0) stall <= 1'b1;
      if (!synced) begin
        if (i == 32'hAA99_5566) synced <= 1'b1;
      end else if (wr_left != 0) begin
        wr_left <= wr_left - 1;
        unique case (cur_reg)
          5'd1: begin far <= i; wptr <= i * FRAME_WORDS; rptr <= i * FRAME_WORDS; end
          5'd2: begin
                  if (wptr < WORDS) cfg[wptr] <= i;
                  wptr <= wptr + 1;
                end
          5'd4: if (i == 32'h0000_000D) begin
                  synced  <= 1'b0;
                  desyncs <= desyncs + 1;
                  rm_id   <= (cfg[0] == SIG_MUL) ? RM_MUL :
                             (cfg[0] == SIG_DIV) ? RM_DIV : RM_BLANK;
                end
          default: ;
        endcase
      end else if (i[31:29] == 3'b001) begin
        cur_reg <= i[17:13];
        if (i[28:27] == 2'b10) wr_left <= 27'(i[10:0]);
        if (i[28:27] == 2'b01) begin
          rd_left   <= 27'(i[10:0]);
          rd_is_reg <= (i[17:13] != 5'd3);
          rd_reg    <= i[17:13];
        end
      end else if (i[31:29] == 3'b010) begin
        if (i[28:27] == 2'b10) wr_left <= i[26:0];
        if (i[28:27] == 2'b01) rd_left <= i[26:0];
      end
    end
    if (reading) begin
      if (busy) rd_cnt <= rd_cnt + 1;
      else begin
        rd_cnt   <= 0;
        if (!rd_is_reg) rptr <= rptr + 1;
        rd_words <= rd_words + 1;
        if (rd_left != 0) rd_left <= rd_left - 1;
      end
    end
  end
endmodule
