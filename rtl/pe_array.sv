// pe_array: the ROWS x COLS reconfigurable array of PEs.
//
// PEs are connected to their four nearest neighbours (north, south, east,
// west) in a mesh; inputs that fall off the edge of the array read zero. PE
// (r,c) has index r*COLS+c. Each row shares two data buses, bus_a[r] and
// bus_b[r], fed from the frame buffer. The predicate flags of the west and
// north neighbours are passed along for predicated execution. Every PE gets
// its own context each cycle, so the whole array is reconfigured in one clock.
//
// The 8x5 size follows the evaluated architecture; the mesh, the edge
// behaviour and the per-row buses are this design's choices (the interconnect
// is not specified in detail). Timing is that of pe: one clock per context.
module pe_array
  import dcca_pkg::*;
#(
  parameter int unsigned ROWS = 8,
  parameter int unsigned COLS = 5,
  localparam int unsigned NPE = ROWS * COLS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,
  input  pe_ctrl_t          pe_ctrl [NPE],
  input  logic [DATA_W-1:0] bus_a [ROWS],
  input  logic [DATA_W-1:0] bus_b [ROWS],
  output logic [DATA_W-1:0] pe_out [NPE],
  output logic [NPE-1:0]    pe_pred
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned P = r * COLS + c;
      logic [DATA_W-1:0] n, s, e, w;
      logic pw, pn;
      if (r > 0)        begin : g_n assign n = pe_out[P-COLS]; assign pn = pe_pred[P-COLS]; end
      else              begin : g_nz assign n = '0; assign pn = 1'b0; end
      if (r < ROWS - 1) begin : g_s assign s = pe_out[P+COLS]; end
      else              begin : g_sz assign s = '0; end
      if (c < COLS - 1) begin : g_e assign e = pe_out[P+1]; end
      else              begin : g_ez assign e = '0; end
      if (c > 0)        begin : g_w assign w = pe_out[P-1]; assign pw = pe_pred[P-1]; end
      else              begin : g_wz assign w = '0; assign pw = 1'b0; end

      pe u_pe (
        .clk, .rst_n, .en, .ctrl(pe_ctrl[P]),
        .in_n(n), .in_s(s), .in_e(e), .in_w(w),
        .bus_a(bus_a[r]), .bus_b(bus_b[r]),
        .pred_w(pw), .pred_n(pn),
        .out(pe_out[P]), .pred_flag(pe_pred[P])
      );
    end
  end

endmodule
