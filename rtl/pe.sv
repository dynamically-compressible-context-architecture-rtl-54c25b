// pe: processing element of the reconfigurable array.
//
// One context (pe_ctrl_t, already decoded from the configuration cache)
// configures the PE for one clock. MUX_A and MUX_B pick the two operands from
// the register file, the four mesh neighbours, the PE's own output register,
// the two row data buses or a constant. The ALU/multiplier computes a 32-bit
// signed result; SHIFT then shifts it left or right (arithmetic) by 0..15;
// SAT clamps it to a signed or unsigned 8- or 16-bit range, otherwise the low
// 16 bits are kept. The result is written into the output register and, when
// WDB_EN is set, also into register-file entry REG_FILE. Predicated
// operations (PRED enabled) take their predicate from the PE's own flag, its
// inverse, or the flag of the west or north neighbour; the flag is set by the
// compare operations SLT and SEQ. Operations marked "hold" in dcca_pkg, and
// undefined opcodes, leave the output register unchanged.
//
// Timing: the operation of a context presented while en=1 is visible on out
// and pred_flag after the next rising clock edge. Everything resets to zero.
//
// The set of functions (two-operand ALU, predicated execution, saturation,
// shift, register file) follows the architecture; the datapath width, the
// opcodes, the operand sources and the order ALU -> SHIFT -> SAT are this
// design's choices.
module pe
  import dcca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,        // a context is executed this cycle
  input  pe_ctrl_t          ctrl,
  input  logic [DATA_W-1:0] in_n, in_s, in_e, in_w,  // neighbour outputs
  input  logic [DATA_W-1:0] bus_a, bus_b,            // row data buses
  input  logic              pred_w, pred_n,          // neighbour flags
  output logic [DATA_W-1:0] out,
  output logic              pred_flag
);

  logic [DATA_W-1:0] rf [RF_DEPTH];
  logic signed [DATA_W-1:0] a, b;
  logic signed [31:0] a32, b32, r, sh, prod;
  logic p, wr, set_flag, flag_val;
  logic [DATA_W-1:0] res;

  function automatic logic [DATA_W-1:0] operand(input logic [MUX_W-1:0] s,
      input logic [DATA_W-1:0] r0, r1, r2, r3, n, so, e, w, self, ba, bb);
    case (s)
      4'd0:     return r0;
      4'd1:     return r1;
      4'd2:     return r2;
      4'd3:     return r3;
      SRC_N:    return n;
      SRC_S:    return so;
      SRC_E:    return e;
      SRC_W:    return w;
      SRC_SELF: return self;
      SRC_BUSA: return ba;
      SRC_BUSB: return bb;
      SRC_ONE:  return DATA_W'(1);
      default:  return '0;
    endcase
  endfunction

  function automatic logic [DATA_W-1:0] saturate(input logic signed [31:0] v,
                                                 input logic [SAT_W-1:0] mode);
    logic signed [31:0] lo, hi;
    case (mode)
      SAT_S8:  begin lo = -32'sd128;   hi = 32'sd127;   end
      SAT_U8:  begin lo = 32'sd0;      hi = 32'sd255;   end
      SAT_S16: begin lo = -32'sd32768; hi = 32'sd32767; end
      default: begin lo = 32'sd0;      hi = 32'sd65535; end
    endcase
    if (v < lo)      return lo[DATA_W-1:0];
    else if (v > hi) return hi[DATA_W-1:0];
    else             return v[DATA_W-1:0];
  endfunction

  always_comb begin
    a = operand(ctrl.mux_a, rf[0], rf[1], rf[2], rf[3], in_n, in_s, in_e, in_w,
                out, bus_a, bus_b);
    b = ctrl.mux_b_en ? operand(ctrl.mux_b, rf[0], rf[1], rf[2], rf[3], in_n,
                                in_s, in_e, in_w, out, bus_a, bus_b) : '0;
    a32  = 32'(a);
    b32  = 32'(b);
    prod = a32 * b32;

    p = 1'b1;
    if (ctrl.pred_en) begin
      case (ctrl.pred)
        PRED_OWN:  p = pred_flag;
        PRED_NOWN: p = ~pred_flag;
        PRED_WEST: p = pred_w;
        default:   p = pred_n;
      endcase
    end

    wr = 1'b1;
    set_flag = 1'b0;
    flag_val = 1'b0;
    r = '0;
    case (ctrl.alu_op)
      OP_PASS:   r = a32;
      OP_NOT:    r = ~a32;
      OP_NEG:    r = -a32;
      OP_ABS:    r = (a32 < 0) ? -a32 : a32;
      OP_PMOV:   begin r = a32;  wr = p; end
      OP_PNEG:   begin r = -a32; wr = p; end
      OP_ADD:    r = a32 + b32;
      OP_SUB:    r = a32 - b32;
      OP_MUL:    r = prod;
      OP_AND:    r = a32 & b32;
      OP_OR:     r = a32 | b32;
      OP_XOR:    r = a32 ^ b32;
      OP_SLT:    begin flag_val = (a32 < b32);  r = 32'(flag_val); set_flag = 1'b1; end
      OP_SEQ:    begin flag_val = (a32 == b32); r = 32'(flag_val); set_flag = 1'b1; end
      OP_MIN:    r = (a32 < b32) ? a32 : b32;
      OP_MAX:    r = (a32 > b32) ? a32 : b32;
      OP_ABSDIF: r = (a32 > b32) ? a32 - b32 : b32 - a32;
      OP_MAC:    r = 32'($signed(out)) + prod;
      OP_SEL:    r = p ? a32 : b32;
      OP_PADD:   begin r = a32 + b32; wr = p; end
      OP_PSUB:   begin r = a32 - b32; wr = p; end
      OP_PMUL:   begin r = prod;      wr = p; end
      default:   wr = 1'b0;  // OP_NOP and undefined opcodes hold
    endcase

    if (ctrl.shift_en) sh = ctrl.shift[4] ? (r >>> ctrl.shift[3:0]) : (r << ctrl.shift[3:0]);
    else               sh = r;

    res = ctrl.sat_en ? saturate(sh, ctrl.sat) : sh[DATA_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out       <= '0;
      pred_flag <= 1'b0;
      for (int i = 0; i < RF_DEPTH; i++) rf[i] <= '0;
    end else if (en) begin
      if (wr) out <= res;
      if (wr && ctrl.rf_we) rf[ctrl.rf_wa] <= res;
      if (set_flag) pred_flag <= flag_val;
    end
  end

endmodule
