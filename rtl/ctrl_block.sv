// ctrl_block: enable signals of the ALU-dependent supplementary fields.
//
// The ALU_OP encoding is arranged so that the fields an operation needs can be
// read from the opcode with a little logic: the MSB (A4) separates
// two-operand operations (A4=1, MUX_B used) from one-operand operations
// (A4=0), and A3..A0 classify the operations further. That MUX_B is enabled by
// A4 follows the architecture's description; using A3..A2 = 2'b11 to mark
// predicated operations (PRED used) is this design's own encoding.
//
// Purely combinational, no clock.
module ctrl_block
  import dcca_pkg::*;
(
  input  logic [OP_W-1:0] alu_op,    // ALU_OP field A4..A0
  output logic            mux_b_en,  // MUX_B field is valid
  output logic            pred_en    // PRED field is valid
);

  always_comb begin
    mux_b_en = alu_op[4];
    pred_en  = alu_op[3] & alu_op[2];
  end

endmodule
