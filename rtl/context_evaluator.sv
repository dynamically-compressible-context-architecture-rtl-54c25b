// context_evaluator: decides whether a full 32-bit context word can be
// compressed into the 18-bit compressed format and builds that word.
//
// A word can be compressed when the supplementary fields it enables fit into
// the 6-bit supplementary zone of the compressed word without overlapping
// (the field concurrency rule). Enables come from ALU_OP through ctrl_block
// (MUX_B, PRED) and from the flags merged into ALU_OP (SAT_EN, SHIFT_EN,
// WDB_EN). Each enabled field is moved to its compressed position; the bits
// of disabled fields are cleared, and the reserved (unnecessary) bits are
// dropped. When the word cannot be compressed, cmp_word carries the upper 18
// bits of the word unchanged (the CE1 part of the uncompressed word) and
// ce2_word its lower 14 bits.
//
// The check against the field combinations follows the architecture's
// context evaluation; the field positions are those listed in dcca_pkg.
// Here it is hardware on the context load path, so contexts can be loaded in
// uncompressed form. Purely combinational.
module context_evaluator
  import dcca_pkg::*;
(
  input  logic [CTX_W-1:0] ctx_in,       // uncompressed context word
  output logic             compressible, // 1: stored as CE1 only (CMP=1)
  output logic [CMP_W-1:0] cmp_word,     // value for CE1
  output logic [CE2_W-1:0] ce2_word      // value for CE2 (unused when compressible)
);

  logic [OP_W-1:0] op;
  logic mux_b_en, pred_en, sat_en, shift_en, wdb_en;
  logic [5:0] m_muxb, m_pred, m_sat, m_shift, m_rf;  // occupancy of the zone
  logic overlap;

  assign op       = ctx_in[POS_OP +: OP_W];
  assign sat_en   = ctx_in[POS_SAT_EN];
  assign shift_en = ctx_in[POS_SHIFT_EN];
  assign wdb_en   = ctx_in[POS_WDB_EN];

  ctrl_block u_ctrl (.alu_op(op), .mux_b_en(mux_b_en), .pred_en(pred_en));

  always_comb begin
    m_muxb  = mux_b_en ? 6'b111100 : 6'b0;
    m_pred  = pred_en  ? 6'b000011 : 6'b0;
    m_sat   = sat_en   ? 6'b000011 : 6'b0;
    m_shift = shift_en ? 6'b111110 : 6'b0;
    m_rf    = wdb_en   ? 6'b001100 : 6'b0;
    overlap = |(m_muxb & (m_pred | m_sat | m_shift | m_rf))
            | |(m_pred & (m_sat | m_shift | m_rf))
            | |(m_sat  & (m_shift | m_rf))
            | |(m_shift & m_rf);
    compressible = ~overlap;

    ce2_word = ctx_in[CE2_W-1:0];
    if (compressible) begin
      cmp_word = '0;
      cmp_word[CMP_W-1:6] = ctx_in[CTX_W-1:POS_MUXA];
      if (mux_b_en) cmp_word[CPOS_MUXB  +: MUX_W]   = ctx_in[POS_MUXB  +: MUX_W];
      if (pred_en)  cmp_word[CPOS_PRED  +: PRED_W]  = ctx_in[POS_PRED  +: PRED_W];
      if (sat_en)   cmp_word[CPOS_SAT   +: SAT_W]   = ctx_in[POS_SAT   +: SAT_W];
      if (shift_en) cmp_word[CPOS_SHIFT +: SHIFT_W] = ctx_in[POS_SHIFT +: SHIFT_W];
      if (wdb_en)   cmp_word[CPOS_RF    +: RF_W]    = ctx_in[POS_RF    +: RF_W];
    end else begin
      cmp_word = ctx_in[CTX_W-1:CE2_W];
    end
  end

endmodule
