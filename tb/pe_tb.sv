// pe_tb: drives the PE with random decoded contexts and random neighbour, bus
// and predicate inputs, and compares the output register, the predicate flag
// and (through MUX_A reads) the register file with a behavioural model kept in
// the testbench. The model uses plain integer arithmetic. Directed cases cover
// saturation limits, shifts in both directions, MAC and predicated hold.
module pe_tb;
  import dcca_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  pe_ctrl_t ctrl;
  logic [15:0] in_n, in_s, in_e, in_w, bus_a, bus_b, out;
  logic pred_w, pred_n, pred_flag;
  int checks = 0, failures = 0;
  // model state
  int m_out, m_rf [4];
  bit m_flag;
  int n_pred_hold = 0, n_sat = 0, n_shift = 0, n_rf = 0;

  pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int s16(input int v);
    return ((v & 32'h8000) != 0) ? (v | 32'hFFFF0000) : (v & 32'hFFFF);
  endfunction

  function automatic int src(input int s);
    case (s)
      0, 1, 2, 3: return m_rf[s];
      4: return s16(int'(in_n));
      5: return s16(int'(in_s));
      6: return s16(int'(in_e));
      7: return s16(int'(in_w));
      8: return m_out;
      9: return s16(int'(bus_a));
      10: return s16(int'(bus_b));
      12: return 1;
      default: return 0;
    endcase
  endfunction

  // one clock of the model; returns through the model state
  task automatic model_step();
    int a, b, r;
    bit p, wr;
    longint prod;
    a = src(int'(ctrl.mux_a));
    b = ctrl.mux_b_en ? src(int'(ctrl.mux_b)) : 0;
    p = 1;
    if (ctrl.pred_en)
      case (int'(ctrl.pred))
        0: p = m_flag;
        1: p = !m_flag;
        2: p = pred_w;
        3: p = pred_n;
      endcase
    wr = 1;
    prod = longint'(a) * longint'(b);
    case (int'(ctrl.alu_op))
      0: r = a;
      1: r = ~a;
      2: r = -a;
      3: r = a < 0 ? -a : a;
      12: begin r = a; wr = p; end
      13: begin r = -a; wr = p; end
      16: r = a + b;
      17: r = a - b;
      18: r = int'(prod);
      19: r = a & b;
      20: r = a | b;
      21: r = a ^ b;
      22: begin r = (a < b) ? 1 : 0; m_flag = (a < b); end
      23: begin r = (a == b) ? 1 : 0; m_flag = (a == b); end
      24: r = a < b ? a : b;
      25: r = a > b ? a : b;
      26: r = a > b ? a - b : b - a;
      27: r = m_out + int'(prod);
      28: r = p ? a : b;
      29: begin r = a + b; wr = p; end
      30: begin r = a - b; wr = p; end
      31: begin r = int'(prod); wr = p; end
      default: begin r = 0; wr = 0; end
    endcase
    if (!wr) n_pred_hold++;
    if (ctrl.shift_en) begin
      n_shift++;
      if (ctrl.shift[4]) r = r >>> int'(ctrl.shift[3:0]);
      else r = r << int'(ctrl.shift[3:0]);
    end
    if (ctrl.sat_en) begin
      int lo, hi;
      n_sat++;
      case (int'(ctrl.sat))
        0: begin lo = -128; hi = 127; end
        1: begin lo = 0; hi = 255; end
        2: begin lo = -32768; hi = 32767; end
        default: begin lo = 0; hi = 65535; end
      endcase
      if (r < lo) r = lo; else if (r > hi) r = hi;
    end
    r = s16(r);
    if (wr) begin
      m_out = r;
      if (ctrl.rf_we) begin m_rf[int'(ctrl.rf_wa)] = r; n_rf++; end
    end
  endtask

  task automatic randomize_inputs();
    in_n = 16'($urandom()); in_s = 16'($urandom()); in_e = 16'($urandom());
    in_w = 16'($urandom()); bus_a = 16'($urandom()); bus_b = 16'($urandom());
    pred_w = 1'($urandom()); pred_n = 1'($urandom());
    if ($urandom() % 4 == 0) begin  // small values so compares and sats are interesting
      bus_a = 16'($urandom_range(0, 300)) - 16'd150;
      bus_b = 16'($urandom_range(0, 300)) - 16'd150;
    end
  endtask

  task automatic random_ctrl();
    logic [4:0] op;
    op = 5'($urandom());
    ctrl = '0;
    ctrl.alu_op = alu_op_e'(op);
    ctrl.mux_a = 4'($urandom());
    ctrl.mux_b_en = op[4];
    if (op[4]) ctrl.mux_b = 4'($urandom());
    ctrl.pred_en = op[3] & op[2];
    if (ctrl.pred_en) ctrl.pred = 2'($urandom());
    ctrl.sat_en = 1'($urandom());
    if (ctrl.sat_en) ctrl.sat = 2'($urandom());
    ctrl.shift_en = ($urandom() % 4 == 0);
    if (ctrl.shift_en) ctrl.shift = 5'($urandom());
    ctrl.rf_we = 1'($urandom());
    if (ctrl.rf_we) ctrl.rf_wa = 2'($urandom());
  endtask

  task automatic step_and_check();
    en = 1;
    #1;
    model_step();
    @(negedge clk);
    checks += 2;
    if (s16(int'(out)) != m_out) begin
      failures++; $display("op %s: out %0d expected %0d", ctrl.alu_op.name(), $signed(out), m_out);
    end
    if (pred_flag != m_flag) begin failures++; $display("op %s: flag", ctrl.alu_op.name()); end
  endtask

  initial begin
    ctrl = '0;
    randomize_inputs();
    m_out = 0; m_flag = 0;
    for (int i = 0; i < 4; i++) m_rf[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // directed: saturate 200 to s8 -> 127
    ctrl = '0; ctrl.alu_op = OP_PASS; ctrl.mux_a = SRC_BUSA; ctrl.sat_en = 1; ctrl.sat = SAT_S8;
    bus_a = 16'd200;
    step_and_check();
    checks++; if (out !== 16'd127) begin failures++; $display("sat s8"); end
    // multiply 300*300 saturated to s16 -> 32767
    ctrl = '0; ctrl.alu_op = OP_MUL; ctrl.mux_a = SRC_BUSA; ctrl.mux_b_en = 1; ctrl.mux_b = SRC_BUSB;
    ctrl.sat_en = 1; ctrl.sat = SAT_S16; bus_a = 16'd300; bus_b = 16'd300;
    step_and_check();
    checks++; if (out !== 16'd32767) begin failures++; $display("sat s16"); end
    // -64 >>> 3 = -8, written to RF[2]
    ctrl = '0; ctrl.alu_op = OP_PASS; ctrl.mux_a = SRC_BUSA; ctrl.shift_en = 1; ctrl.shift = 5'b10011;
    ctrl.rf_we = 1; ctrl.rf_wa = 2; bus_a = -16'sd64;
    step_and_check();
    checks++; if (out !== -16'sd8) begin failures++; $display("shift right"); end
    // MAC: out = -8 + 3*4 = 4
    ctrl = '0; ctrl.alu_op = OP_MAC; ctrl.mux_a = SRC_BUSA; ctrl.mux_b_en = 1; ctrl.mux_b = SRC_BUSB;
    bus_a = 16'd3; bus_b = 16'd4;
    step_and_check();
    checks++; if (out !== 16'd4) begin failures++; $display("mac"); end
    // read back RF[2] (-8)
    ctrl = '0; ctrl.alu_op = OP_PASS; ctrl.mux_a = 4'd2;
    step_and_check();
    checks++; if (out !== -16'sd8) begin failures++; $display("rf read"); end
    // SLT 1 < 2 sets the flag, then PADD on inverted flag holds
    ctrl = '0; ctrl.alu_op = OP_SLT; ctrl.mux_a = SRC_ZERO; ctrl.mux_b_en = 1; ctrl.mux_b = SRC_ONE;
    step_and_check();
    checks++; if (pred_flag !== 1'b1) begin failures++; $display("slt flag"); end
    ctrl = '0; ctrl.alu_op = OP_PADD; ctrl.mux_a = SRC_BUSA; ctrl.mux_b_en = 1; ctrl.mux_b = SRC_BUSB;
    ctrl.pred_en = 1; ctrl.pred = PRED_NOWN;
    step_and_check();
    checks++; if (out !== 16'd1) begin failures++; $display("predicated hold"); end
    // en=0: nothing changes
    en = 0; ctrl.alu_op = OP_ADD; ctrl.pred_en = 0;
    @(negedge clk);
    checks++; if (out !== 16'd1) begin failures++; $display("en=0 changed out"); end
    for (int i = 0; i < 20000; i++) begin
      randomize_inputs();
      random_ctrl();
      step_and_check();
    end
    checks++;
    if (n_pred_hold == 0 || n_sat == 0 || n_shift == 0 || n_rf == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
