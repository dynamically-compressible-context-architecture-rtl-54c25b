// dcca_cgra_top: reconfigurable array architecture with a dynamically
// compressible configuration cache.
//
// The host (not part of this design) loads uncompressed 32-bit context words
// into the configuration cache, which compresses every word that fits into 18
// bits, and loads operands into the frame buffer. start then runs a kernel:
// ctx_len context addresses per iteration, iter_count iterations, one context
// per PE per clock. Iteration i reads its operands from frame-buffer entry i
// (row buses), and after its last context the outputs of the east column of
// the array are stored in result entry i, where the host can read them.
//
// Pipeline: fetch (cache read, cycle t) -> execute (PE array, t+1) ->
// result write-back (t+2, for the last context of an iteration). done pulses
// after the last result is written; busy covers the whole run.
//
// The array size (8x5), the 32-bit context split into CE1/CE2 with CMP from
// the cache control unit, and the compression rule follow the architecture.
// The loop sequencing and the frame-buffer organisation are this design's.
module dcca_cgra_top
  import dcca_pkg::*;
#(
  parameter int unsigned ROWS      = 8,
  parameter int unsigned COLS      = 5,
  parameter int unsigned CTX_DEPTH = 32,
  parameter int unsigned FB_DEPTH  = 128,
  parameter int unsigned ITW       = 16,
  localparam int unsigned NPE  = ROWS * COLS,
  localparam int unsigned CAW  = (CTX_DEPTH > 1) ? $clog2(CTX_DEPTH) : 1,
  localparam int unsigned PW   = (NPE > 1) ? $clog2(NPE) : 1,
  localparam int unsigned FAW  = (FB_DEPTH > 1) ? $clog2(FB_DEPTH) : 1,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // context load (host)
  input  logic              cfg_we,
  input  logic [PW-1:0]     cfg_pe,
  input  logic [CAW-1:0]    cfg_addr,
  input  logic [CTX_W-1:0]  cfg_data,
  // frame buffer (host)
  input  logic              fb_we,
  input  logic [FAW-1:0]    fb_waddr,
  input  logic [RW-1:0]     fb_wrow,
  input  logic              fb_wsel,
  input  logic [DATA_W-1:0] fb_wdata,
  input  logic [FAW-1:0]    fb_raddr,
  input  logic [RW-1:0]     fb_rrow,
  output logic [DATA_W-1:0] fb_rdata,
  // kernel control
  input  logic              start,
  input  logic [CAW:0]      ctx_len,
  input  logic [ITW-1:0]    iter_count,
  output logic              busy,
  output logic              done,
  // configuration cache activity (CE1/CE2 bank selects of this cycle)
  output logic [NPE-1:0]    ce1_cs,
  output logic [NPE-1:0]    ce2_cs
);

  pe_ctrl_t          pe_ctrl [NPE];
  logic              cc_busy, cc_done, exec_valid, exec_last;
  logic [ITW-1:0]    exec_iter;
  logic [DATA_W-1:0] bus_a [ROWS];
  logic [DATA_W-1:0] bus_b [ROWS];
  logic [DATA_W-1:0] pe_out [NPE];
  logic [NPE-1:0]    pe_pred;
  logic [DATA_W-1:0] res_data [ROWS];
  logic              wb_valid, wb_done, ex_done;
  logic [ITW-1:0]    wb_iter;

  config_cache #(.NPE(NPE), .DEPTH(CTX_DEPTH), .ITW(ITW)) u_cache (
    .clk, .rst_n, .cfg_we, .cfg_pe, .cfg_addr, .cfg_data,
    .start, .ctx_len, .iter_count, .busy(cc_busy), .done(cc_done),
    .pe_ctrl, .exec_valid, .exec_iter, .exec_last, .ce1_cs, .ce2_cs
  );

  pe_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n, .en(exec_valid), .pe_ctrl, .bus_a, .bus_b, .pe_out, .pe_pred
  );

  for (genvar r = 0; r < ROWS; r++) begin : g_res
    assign res_data[r] = pe_out[r * COLS + COLS - 1];
  end

  frame_buffer #(.ROWS(ROWS), .DEPTH(FB_DEPTH)) u_fb (
    .clk, .rst_n,
    .host_we(fb_we), .host_waddr(fb_waddr), .host_wrow(fb_wrow),
    .host_wsel(fb_wsel), .host_wdata(fb_wdata),
    .host_raddr(fb_raddr), .host_rrow(fb_rrow), .host_rdata(fb_rdata),
    .rd_addr(FAW'(exec_iter)), .bus_a, .bus_b,
    .res_we(wb_valid), .res_addr(FAW'(wb_iter)), .res_data
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid <= 1'b0;
      wb_iter  <= '0;
      ex_done  <= 1'b0;
      wb_done  <= 1'b0;
    end else begin
      wb_valid <= exec_valid && exec_last;
      wb_iter  <= exec_iter;
      ex_done  <= cc_done;
      wb_done  <= ex_done;
    end
  end

  assign busy = cc_busy | exec_valid | wb_valid;
  assign done = wb_done;

endmodule
