// dcca_pkg: shared types and constants of the compressible-context CGRA.
//
// The context word is 32 bits. The necessary fields (ALU_OP with the merged
// enable flags, MUX_A) sit next to the MSB, the supplementary fields follow,
// and the unnecessary (reserved) field sits at the LSB. The upper 18 bits form
// the compressed zone, stored in cache element CE1; the lower 14 bits form the
// uncompressed zone, stored in CE2, which is not read for compressed words.
//
// Uncompressed (default) layout, bit positions of the 32-bit word:
//   [31:27] ALU_OP      5  necessary
//   [26]    SAT_EN      1  flag of an ALU-independent field, merged into ALU_OP
//   [25]    SHIFT_EN    1  flag merged into ALU_OP
//   [24]    WDB_EN      1  register-file write flag, merged into ALU_OP
//   [23:20] MUX_A       4  necessary
//   [19:16] MUX_B       4  supplementary, ALU-dependent (enabled by ALU_OP[4])
//   [15:14] PRED        2  supplementary, ALU-dependent (enabled by ALU_OP[3:2]==11)
//   [13:12] SAT         2  supplementary, ALU-independent (default position)
//   [11:7]  SHIFT       5  supplementary, ALU-independent (default position)
//   [6:5]   REG_FILE    2  supplementary, ALU-independent (default position)
//   [4:0]   RESERVED    5  unnecessary, dropped under compression
//
// Compressed word (18 bits, CE1 only). Bits [17:6] equal word bits [31:20];
// the 6-bit supplementary zone [5:0] holds whichever supplementary fields are
// enabled, at these positions:
//   MUX_B [5:2], PRED [1:0]       (same place as uncompressed)
//   SAT   [1:0]                   (second position, shares PRED's place)
//   SHIFT [5:1]                   (second position, only for one-operand ops)
//   REG_FILE [3:2]                (second position, only without MUX_B/SHIFT)
// A word is compressible when the enabled fields' compressed positions do not
// overlap. The widths of the individual fields and the exact positions are
// this design's choice; the 32-bit word, the 18-bit compressed width made of
// ALU_OP+flags, MUX_A, MUX_B and PRED, and the double positions of REG_FILE,
// SHIFT and SAT follow the architecture's description.
package dcca_pkg;

  localparam int unsigned CTX_W   = 32;  // full context word
  localparam int unsigned CMP_W   = 18;  // compressed context word (CE1)
  localparam int unsigned CE2_W   = CTX_W - CMP_W;  // 14, uncompressed zone
  localparam int unsigned DATA_W  = 16;  // PE datapath width
  localparam int unsigned RF_DEPTH = 4;  // PE register file entries

  // Field widths
  localparam int unsigned OP_W    = 5;
  localparam int unsigned MUX_W   = 4;
  localparam int unsigned PRED_W  = 2;
  localparam int unsigned SAT_W   = 2;
  localparam int unsigned SHIFT_W = 5;
  localparam int unsigned RF_W    = 2;
  localparam int unsigned RSV_W   = 5;

  // Default positions (LSB of each field) in the 32-bit word
  localparam int unsigned POS_OP       = 27;
  localparam int unsigned POS_SAT_EN   = 26;
  localparam int unsigned POS_SHIFT_EN = 25;
  localparam int unsigned POS_WDB_EN   = 24;
  localparam int unsigned POS_MUXA     = 20;
  localparam int unsigned POS_MUXB     = 16;
  localparam int unsigned POS_PRED     = 14;
  localparam int unsigned POS_SAT      = 12;
  localparam int unsigned POS_SHIFT    = 7;
  localparam int unsigned POS_RF       = 5;

  // Second (compressed) positions, LSB within the 18-bit compressed word
  localparam int unsigned CPOS_MUXB  = 2;
  localparam int unsigned CPOS_PRED  = 0;
  localparam int unsigned CPOS_SAT   = 0;
  localparam int unsigned CPOS_SHIFT = 1;
  localparam int unsigned CPOS_RF    = 2;

  // ALU operations. ALU_OP[4]=1: two operands (MUX_B used).
  // ALU_OP[3:2]=2'b11: predicated operation (PRED used).
  typedef enum logic [OP_W-1:0] {
    OP_PASS   = 5'b00000,  // out = A
    OP_NOT    = 5'b00001,  // out = ~A
    OP_NEG    = 5'b00010,  // out = -A
    OP_ABS    = 5'b00011,  // out = |A|
    OP_NOP    = 5'b00100,  // output register holds
    OP_PMOV   = 5'b01100,  // pred ? A : hold
    OP_PNEG   = 5'b01101,  // pred ? -A : hold
    OP_ADD    = 5'b10000,
    OP_SUB    = 5'b10001,
    OP_MUL    = 5'b10010,
    OP_AND    = 5'b10011,
    OP_OR     = 5'b10100,
    OP_XOR    = 5'b10101,
    OP_SLT    = 5'b10110,  // out = (A < B), sets the predicate flag
    OP_SEQ    = 5'b10111,  // out = (A == B), sets the predicate flag
    OP_MIN    = 5'b11000,
    OP_MAX    = 5'b11001,
    OP_ABSDIF = 5'b11010,  // |A - B|
    OP_MAC    = 5'b11011,  // out = out + A*B
    OP_SEL    = 5'b11100,  // pred ? A : B
    OP_PADD   = 5'b11101,  // pred ? A+B : hold
    OP_PSUB   = 5'b11110,  // pred ? A-B : hold
    OP_PMUL   = 5'b11111   // pred ? A*B : hold
  } alu_op_e;

  // Operand sources of MUX_A / MUX_B
  localparam logic [MUX_W-1:0] SRC_RF0   = 4'd0;  // 0..3: register file entries
  localparam logic [MUX_W-1:0] SRC_N     = 4'd4;
  localparam logic [MUX_W-1:0] SRC_S     = 4'd5;
  localparam logic [MUX_W-1:0] SRC_E     = 4'd6;
  localparam logic [MUX_W-1:0] SRC_W     = 4'd7;
  localparam logic [MUX_W-1:0] SRC_SELF  = 4'd8;  // own output register
  localparam logic [MUX_W-1:0] SRC_BUSA  = 4'd9;  // row data bus A
  localparam logic [MUX_W-1:0] SRC_BUSB  = 4'd10; // row data bus B
  localparam logic [MUX_W-1:0] SRC_ZERO  = 4'd11;
  localparam logic [MUX_W-1:0] SRC_ONE   = 4'd12; // 13..15 read as zero

  // PRED field: predicate source
  localparam logic [PRED_W-1:0] PRED_OWN  = 2'd0;
  localparam logic [PRED_W-1:0] PRED_NOWN = 2'd1;  // inverted own flag
  localparam logic [PRED_W-1:0] PRED_WEST = 2'd2;
  localparam logic [PRED_W-1:0] PRED_NORTH = 2'd3;

  // SAT field: saturation range
  localparam logic [SAT_W-1:0] SAT_S8  = 2'd0;
  localparam logic [SAT_W-1:0] SAT_U8  = 2'd1;
  localparam logic [SAT_W-1:0] SAT_S16 = 2'd2;
  localparam logic [SAT_W-1:0] SAT_U16 = 2'd3;

  // Decoded PE control, as delivered by the field position multiplexers.
  // Disabled fields are forced to zero.
  typedef struct packed {
    alu_op_e                 alu_op;
    logic [MUX_W-1:0]        mux_a;
    logic                    mux_b_en;
    logic [MUX_W-1:0]        mux_b;
    logic                    pred_en;
    logic [PRED_W-1:0]       pred;
    logic                    sat_en;
    logic [SAT_W-1:0]        sat;
    logic                    shift_en;
    logic [SHIFT_W-1:0]      shift;   // [4] 1=right (arithmetic), [3:0] amount
    logic                    rf_we;
    logic [RF_W-1:0]         rf_wa;
  } pe_ctrl_t;

endpackage
