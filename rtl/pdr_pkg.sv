// Shared types and constants of the partially reconfigurable LEON3 extension.
//
// The register map of the ICAP wrapper's APB window, the identifiers of the
// modules that can be loaded into the reconfigurable Mul/Div region, and the
// request bundle the integer unit sends to that region. The document gives
// the blocks and their functions; the register map, the encodings and the
// field layout here are this design's own choices.
package pdr_pkg;

  // Data width of the APB bus, the BRAM and the 32-bit ICAP port.
  localparam int unsigned DATA_W = 32;
  // Local byte address width of the ICAP hardware system's APB window.
  localparam int unsigned PADDR_W = 12;

  // Register map (byte offsets inside the APB window). Offsets below
  // REG_BASE address the BRAM buffer word by word; the rest are registers.
  localparam logic [PADDR_W-1:0] REG_BASE   = 12'h800;
  localparam logic [PADDR_W-1:0] REG_SIZE   = 12'h800; // words to transfer
  localparam logic [PADDR_W-1:0] REG_OFFSET = 12'h804; // first BRAM word
  localparam logic [PADDR_W-1:0] REG_CTRL   = 12'h808; // write starts a transfer
  localparam logic [PADDR_W-1:0] REG_STATUS = 12'h80C; // {.., busy, done}

  // REG_CTRL bit 0: 0 = configure (BRAM -> ICAP), 1 = readback (ICAP -> BRAM).
  localparam int unsigned CTRL_READBACK_BIT = 0;
  localparam int unsigned STAT_DONE_BIT     = 0;
  localparam int unsigned STAT_BUSY_BIT     = 1;

  // Transfer command from the ICAP decoder to the ICAP state machine.
  typedef struct packed {
    logic readback;   // 1: ICAP -> BRAM, 0: BRAM -> ICAP
  } icap_cmd_t;

  // Module currently held by the reconfigurable region (from the
  // configuration memory): empty region, multiplier or divider.
  typedef enum logic [1:0] {
    RM_BLANK = 2'd0,
    RM_MUL   = 2'd1,
    RM_DIV   = 2'd2
  } rm_id_t;

  // Operation request from the integer unit to the Mul/Div region.
  typedef struct packed {
    logic        start_mul; // one-cycle start of a multiplication
    logic        start_div; // one-cycle start of a division
    logic        sgn;       // 1: signed operands
    logic [31:0] y;         // Y register: upper dividend word
    logic [31:0] op1;       // rs1: multiplicand / lower dividend word
    logic [31:0] op2;       // operand2: multiplier / divisor
  } muldiv_req_t;

  // Result of the Mul/Div region back to the integer unit.
  typedef struct packed {
    logic        ready;     // one-cycle: result valid
    logic        busy;      // a division is in progress
    logic        unimpl;    // one-cycle: requested unit is not loaded
    logic [63:0] result;    // product, or quotient in bits 31:0
    logic        ovf;       // division overflow (quotient saturated)
    logic        dbz;       // division by zero
  } muldiv_rsp_t;

endpackage
