// ctrl_block_tb: exhaustive check of the ALU_OP -> field-enable logic.
// Every one of the 32 opcodes is applied; MUX_B must be enabled exactly for
// the two-operand half of the code space (16..31) and PRED exactly for the
// last four codes of each half (12..15 and 28..31).
module ctrl_block_tb;
  logic [4:0] op;
  logic mux_b_en, pred_en;
  int checks = 0, failures = 0;

  ctrl_block dut (.alu_op(op), .mux_b_en, .pred_en);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      op = 5'(i);
      #1;
      checks += 2;
      if (mux_b_en !== (i >= 16)) begin
        failures++; $display("op %0d: mux_b_en %0b", i, mux_b_en);
      end
      if (pred_en !== ((i % 16) >= 12)) begin
        failures++; $display("op %0d: pred_en %0b", i, pred_en);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
