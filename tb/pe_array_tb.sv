// pe_array_tb: checks the mesh wiring of the array. Each clock every PE gets
// a random context using a neighbour (N, S, E, W), its own output or a row bus
// as operands, with ADD, SUB, XOR, PASS, SEQ (sets the flag) or SEL predicated
// on the west or north neighbour's flag. A 2-D model of all outputs and flags
// in the testbench, with zero outside the edges, gives the expected values.
module pe_array_tb;
  import dcca_pkg::*;
  localparam int R = 8, C = 5, N = R * C;
  logic clk = 0, rst_n = 0, en = 0;
  pe_ctrl_t pe_ctrl [N];
  logic [15:0] bus_a [R], bus_b [R], pe_out [N];
  logic [N-1:0] pe_pred;
  int checks = 0, failures = 0;
  int m_out [N], nxt [N];
  bit m_flag [N], nflag [N];
  int n_sel_w = 0, n_sel_n = 0;

  pe_array #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int at(input int r, input int c);
    if (r < 0 || r >= R || c < 0 || c >= C) return 0;
    return m_out[r * C + c];
  endfunction
  function automatic bit flag_at(input int r, input int c);
    if (r < 0 || c < 0) return 0;
    return m_flag[r * C + c];
  endfunction
  function automatic int src(input int s, input int r, input int c);
    case (s)
      4: return at(r - 1, c);
      5: return at(r + 1, c);
      6: return at(r, c + 1);
      7: return at(r, c - 1);
      8: return at(r, c);
      9: return int'(bus_a[r]);
      default: return int'(bus_b[r]);
    endcase
  endfunction

  initial begin
    logic [3:0] srcs [7];
    alu_op_e ops [6];
    srcs = '{SRC_N, SRC_S, SRC_E, SRC_W, SRC_SELF, SRC_BUSA, SRC_BUSB};
    ops = '{OP_ADD, OP_SUB, OP_XOR, OP_PASS, OP_SEQ, OP_SEL};
    for (int p = 0; p < N; p++) begin pe_ctrl[p] = '0; m_out[p] = 0; m_flag[p] = 0; end
    for (int r = 0; r < R; r++) begin bus_a[r] = '0; bus_b[r] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      for (int r = 0; r < R; r++) begin
        bus_a[r] = 16'($urandom_range(0, 3)); bus_b[r] = 16'($urandom_range(0, 3));
      end
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          int p, a, b, res;
          alu_op_e op;
          p = r * C + c;
          op = ops[$urandom_range(0, 5)];
          pe_ctrl[p] = '0;
          pe_ctrl[p].alu_op = op;
          pe_ctrl[p].mux_a = srcs[$urandom_range(0, 6)];
          pe_ctrl[p].mux_b_en = 1'(op[4]);
          if (op[4]) pe_ctrl[p].mux_b = srcs[$urandom_range(0, 6)];
          pe_ctrl[p].pred_en = op[3] & op[2];
          if (pe_ctrl[p].pred_en) pe_ctrl[p].pred = 2'($urandom_range(2, 3));
          a = src(int'(pe_ctrl[p].mux_a), r, c) & 32'hFFFF;
          b = op[4] ? src(int'(pe_ctrl[p].mux_b), r, c) & 32'hFFFF : 0;
          nflag[p] = m_flag[p];
          case (op)
            OP_ADD: res = a + b;
            OP_SUB: res = a - b;
            OP_XOR: res = a ^ b;
            OP_SEQ: begin res = (a == b); nflag[p] = (a == b); end
            OP_SEL: begin
              bit pr;
              if (pe_ctrl[p].pred == PRED_WEST) begin pr = flag_at(r, c - 1); n_sel_w++; end
              else begin pr = flag_at(r - 1, c); n_sel_n++; end
              res = pr ? a : b;
            end
            default: res = a;
          endcase
          nxt[p] = res & 32'hFFFF;
        end
      en = 1;
      @(negedge clk);
      for (int p = 0; p < N; p++) begin
        m_out[p] = nxt[p]; m_flag[p] = nflag[p];
        checks += 2;
        if (int'(pe_out[p]) != m_out[p]) begin
          failures++; $display("t %0d pe %0d: %0d expected %0d", t, p, pe_out[p], m_out[p]);
        end
        if (pe_pred[p] != m_flag[p]) begin failures++; $display("t %0d pe %0d flag", t, p); end
      end
    end
    checks++;
    if (n_sel_w == 0 || n_sel_n == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
