// 64-by-32-bit radix-2 non-restoring divider, signed or unsigned, 36 cycles.
//
// This is the divider module that is loaded into the reconfigurable region.
// The document gives its function: a 64-bit dividend {y, op1} divided by a
// 32-bit divisor, signed or unsigned, radix-2 non-restoring iteration, 36
// clock cycles, quotient only (no remainder is returned). The schedule of
// the 36 cycles and the overflow rule are this design's choices, the
// latter following the SPARC V8 divide instructions:
//   cycle 0      `start` and the operands are sampled
//   cycle 1      take magnitudes of dividend and divisor
//   cycle 2      divide-by-zero and overflow pre-check (quotient
//                magnitude >= 2^32); load the partial remainder with the
//                upper dividend word
//   cycles 3-34  32 non-restoring steps, one quotient bit each
//   cycle 35     restore the sign, saturate on overflow, register the result
//   cycle 36     `ready` is high and `quot` valid (as the multiplier's
//                result is in cycle 1)
// A non-restoring step adds or subtracts the divisor depending on the sign
// of the partial remainder, so no step ever restores it; the quotient bit is
// the inverted sign of the new remainder. On overflow the quotient saturates
// to 0xFFFFFFFF (unsigned), 0x7FFFFFFF or 0x80000000 (signed) and `ovf` is
// set. A zero divisor sets `dbz` and returns 0 (the integer unit traps).
//
// Interface: `start` is sampled with the operands while `busy` is low;
// `ready` is high for one cycle in the 36th cycle after
// the one in which `start` was sampled. `rst` is
// synchronous and active high and aborts a division.
module div64 (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic        sgn,
  input  logic [31:0] y,
  input  logic [31:0] op1,
  input  logic [31:0] op2,
  output logic        busy,
  output logic        ready,
  output logic [31:0] quot,
  output logic        ovf,
  output logic        dbz
);
  typedef enum logic [2:0] {S_IDLE, S_ABS, S_CHK, S_ITER, S_SIGN, S_DONE} state_t;
  state_t state;

  logic [63:0]        dvd;      // dividend, then its magnitude; shifts left
  logic [31:0]        dvs;      // divisor magnitude
  logic               neg_q;    // quotient is negative
  logic signed [34:0] rem;      // partial remainder
  logic [31:0]        q;        // quotient bits
  logic [5:0]         step;
  logic               ovf_r, dbz_r, sgn_r;
  logic [32:0]        qmag;     // magnitude check in S_SIGN

  logic signed [34:0] rem_next;
  always_comb begin
    if (rem[34])
      rem_next = {rem[33:0], dvd[63]} + $signed({3'b000, dvs});
    else
      rem_next = {rem[33:0], dvd[63]} - $signed({3'b000, dvs});
  end

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign qmag = {1'b0, q};

  always_ff @(posedge clk) begin
    if (rst) begin
      state <= S_IDLE;
      ready <= 1'b0;
      quot  <= '0;
      ovf   <= 1'b0;
      dbz   <= 1'b0;
      dvd   <= '0;
      dvs   <= '0;
      neg_q <= 1'b0;
      rem   <= '0;
      q     <= '0;
      step  <= '0;
      ovf_r <= 1'b0;
      dbz_r <= 1'b0;
      sgn_r <= 1'b0;
    end else begin
      ready <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            dvd   <= {y, op1};
            dvs   <= op2;
            sgn_r <= sgn;
            state <= S_ABS;
          end else begin
            state <= S_IDLE;
          end
        end
        S_ABS: begin
          neg_q <= sgn_r & (dvd[63] ^ dvs[31]);
          if (sgn_r && dvd[63]) dvd <= -dvd;
          if (sgn_r && dvs[31]) dvs <= -dvs;
          state <= S_CHK;
        end
        S_CHK: begin
          dbz_r <= (dvs == '0);
          ovf_r <= (dvd[63:32] >= dvs) && (dvs != '0);
          rem   <= $signed({3'b000, dvd[63:32]});
          dvd   <= {dvd[31:0], 32'h0};
          step  <= '0;
          q     <= '0;
          state <= S_ITER;
        end
        S_ITER: begin
          rem   <= rem_next;
          q     <= {q[30:0], ~rem_next[34]};
          dvd   <= {dvd[62:0], 1'b0};
          step  <= step + 6'd1;
          if (step == 6'd31) state <= S_SIGN;
        end
        S_SIGN: begin
          ovf <= 1'b0;
          dbz <= dbz_r;
          if (dbz_r) begin
            quot <= '0;
          end else if (!sgn_r) begin
            quot <= ovf_r ? 32'hFFFF_FFFF : q;
            ovf  <= ovf_r;
          end else if (neg_q) begin
            if (ovf_r || qmag > 33'h0_8000_0000) begin
              quot <= 32'h8000_0000;
              ovf  <= 1'b1;
            end else begin
              quot <= -q;
            end
          end else begin
            if (ovf_r || qmag > 33'h0_7FFF_FFFF) begin
              quot <= 32'h7FFF_FFFF;
              ovf  <= 1'b1;
            end else begin
              quot <= q;
            end
          end
          state <= S_DONE;
          ready <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
