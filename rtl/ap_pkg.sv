// Shared types and constants of the associative processor (AP).
//
// The AP is a content-addressable memory (CAM) of ROWS rows. A vector is a
// column field: element i of a vector lives in row (row0 + i), in the byte
// columns col0 .. col0+ws-1 of that row. Every row also carries two one-bit
// flag columns that the lookup tables use: C (carry / borrow / marker) and
// M (latched multiplier bit). Scratch-pad byte address a maps to
// row = a % ROWS and byte column = a / ROWS (column-major), so that a vector
// of consecutive addresses runs down one column.
//
// Operation codes: the core sends an operation with a RoCC custom
// instruction; the opcode is {custom instruction number x, funct[2:0]}.
// ADD on custom-2 with funct code 1 follows the published macro library;
// every other code is this design's own assignment.
package ap_pkg;

  // Default geometry: 512 rows x 32 bytes = 16 KB, the AP size used for
  // most of the evaluation. The split into rows and columns is a choice.
  localparam int unsigned AP_ROWS      = 512;
  localparam int unsigned AP_ROW_BYTES = 32;
  localparam int unsigned AP_MAX_WS    = 15;  // word size field: 4 bits, bytes
  localparam int unsigned DMA_SETUP    = 11;  // communication cycles per transfer

  // Logical lookup-table columns; bit index inside a lut_entry_t field.
  localparam int unsigned LC_A = 0;  // first source operand bit
  localparam int unsigned LC_B = 1;  // second source operand bit
  localparam int unsigned LC_R = 2;  // result bit
  localparam int unsigned LC_C = 3;  // carry / borrow / marker flag column
  localparam int unsigned LC_M = 4;  // multiplier flag column
  localparam int unsigned LC_N = 5;

  // One pass of a lookup table: which logical columns are compared (care)
  // against which values, and which columns are written with which values
  // in the rows whose tag is set.
  typedef struct packed {
    logic [LC_N-1:0] care;
    logic [LC_N-1:0] val;
    logic [LC_N-1:0] wcare;
    logic [LC_N-1:0] wval;
  } lut_entry_t;

  typedef enum logic [4:0] {
    L_ADD,    // in place R = R + B (carry in C), 4 passes
    L_SUB,    // in place R = R - B (borrow in C), 4 passes
    L_CPY,    // R bit <- A bit, 2 passes
    L_XOR_N,  // R (pre-cleared) = A ^ B, 2 passes
    L_XOR_I,  // in place R = R ^ B, 3 passes (C as marker)
    L_AND_N,  // R (pre-cleared) = A & B, 1 pass
    L_AND_I,  // in place R = R & B, 1 pass
    L_OR_N,   // R (pre-set to ones) = A | B, 1 pass
    L_OR_I,   // in place R = R | B, 1 pass
    L_NOT_N,  // R (pre-cleared) = ~A, 1 pass
    L_NOT_I,  // in place R = ~R, 3 passes (C as marker)
    L_SH_N,   // R (pre-cleared) bit <- 1 where A bit is 1, 1 pass
    L_ZERO_R, // R bit <- 0 in every selected row, 1 pass
    L_MLOAD,  // M <- A bit, clear R bit, 2 passes
    L_MADD,   // R bit += (M & B bit) + C, 4 passes
    L_CCLR,   // C <- 0, 1 pass
    L_MCLR,   // M <- 0, 1 pass
    L_RELU    // R bit 0 <- 0 where A's sign bit and R bit 0 are 1, 1 pass
  } lut_id_e;

  typedef enum logic [4:0] {
    OP_NONE  = 5'd0,
    OP_ADD   = 5'b10_001,
    OP_SUB   = 5'b10_010,
    OP_MULT  = 5'b10_011,
    OP_XOR   = 5'b10_100,
    OP_AND   = 5'b10_101,
    OP_OR    = 5'b10_110,
    OP_NOT   = 5'b10_111,
    OP_SHL   = 5'b11_001,
    OP_SHR   = 5'b11_010,
    OP_RELU  = 5'b11_011,
    OP_SET   = 5'b11_100,
    OP_COPY  = 5'b11_101,
    OP_DMALD = 5'b11_110,  // main memory -> scratch-pad
    OP_DMAST = 5'b11_111   // scratch-pad -> main memory
  } ap_op_e;

  // RoCC custom instruction major opcodes (custom-0 .. custom-3).
  localparam logic [6:0] RISCV_CUSTOM0 = 7'h0B;
  localparam logic [6:0] RISCV_CUSTOM1 = 7'h2B;
  localparam logic [6:0] RISCV_CUSTOM2 = 7'h5B;
  localparam logic [6:0] RISCV_CUSTOM3 = 7'h7B;

  function automatic logic is_assoc_op(logic [4:0] op);
    return op inside {OP_ADD, OP_SUB, OP_MULT, OP_XOR, OP_AND, OP_OR, OP_NOT,
                      OP_SHL, OP_SHR, OP_RELU, OP_SET, OP_COPY};
  endfunction

endpackage
