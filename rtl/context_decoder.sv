// context_decoder: the field position multiplexers between a cache element
// pair and its PE.
//
// CE1 always delivers the upper 18 bits; CE2 delivers the lower 14 bits only
// for uncompressed words (cmp=0). ALU_OP, its merged flags, MUX_A, MUX_B and
// PRED have a single position inside CE1. SAT, SHIFT and REG_FILE have two
// positions: their default position in CE2, and a second position in the
// supplementary zone of CE1 that is selected when cmp=1. The enables of
// MUX_B and PRED come from ALU_OP through ctrl_block, the others from the
// flags merged into ALU_OP; every disabled field is forced to zero so that
// overlapping compressed positions never reach the PE. The CE2 value is not
// looked at while cmp=1.
//
// The structure (two positions selected by CMP, enables from the CTRL BLOCK
// and merged flags) follows the architecture; the positions are those listed
// in dcca_pkg. Purely combinational.
module context_decoder
  import dcca_pkg::*;
(
  input  logic [CMP_W-1:0] ce1_data,  // CE1 read data
  input  logic [CE2_W-1:0] ce2_data,  // CE2 read data
  input  logic             cmp,       // 1: the word was stored compressed
  output pe_ctrl_t         ctrl       // decoded PE control
);

  logic [OP_W-1:0] op;
  logic mux_b_en, pred_en;

  assign op = ce1_data[CMP_W-1 -: OP_W];

  ctrl_block u_ctrl (.alu_op(op), .mux_b_en(mux_b_en), .pred_en(pred_en));

  always_comb begin
    logic [SAT_W-1:0]   sat_v;
    logic [SHIFT_W-1:0] shift_v;
    logic [RF_W-1:0]    rf_v;
    if (cmp) begin
      sat_v   = ce1_data[CPOS_SAT   +: SAT_W];
      shift_v = ce1_data[CPOS_SHIFT +: SHIFT_W];
      rf_v    = ce1_data[CPOS_RF    +: RF_W];
    end else begin
      sat_v   = ce2_data[POS_SAT    +: SAT_W];
      shift_v = ce2_data[POS_SHIFT  +: SHIFT_W];
      rf_v    = ce2_data[POS_RF     +: RF_W];
    end

    ctrl          = '0;
    ctrl.alu_op   = alu_op_e'(op);
    ctrl.mux_a    = ce1_data[POS_MUXA - CE2_W +: MUX_W];
    ctrl.mux_b_en = mux_b_en;
    ctrl.pred_en  = pred_en;
    ctrl.sat_en   = ce1_data[POS_SAT_EN   - CE2_W];
    ctrl.shift_en = ce1_data[POS_SHIFT_EN - CE2_W];
    ctrl.rf_we    = ce1_data[POS_WDB_EN   - CE2_W];
    if (mux_b_en)      ctrl.mux_b = ce1_data[POS_MUXB - CE2_W +: MUX_W];
    if (pred_en)       ctrl.pred  = ce1_data[POS_PRED - CE2_W +: PRED_W];
    if (ctrl.sat_en)   ctrl.sat   = sat_v;
    if (ctrl.shift_en) ctrl.shift = shift_v;
    if (ctrl.rf_we)    ctrl.rf_wa = rf_v;
  end

endmodule
