// config_cache: the compressible configuration cache of the whole array.
//
// Every PE owns a cache element made of two banks: CE1 (the 18-bit
// compressed zone) and CE2 (the 14-bit uncompressed zone). A common address,
// from the cache control unit, is read from all PEs' banks every clock while a
// kernel runs. CE1 is always selected; CE2 of a PE is selected only when that
// PE's word at the address is uncompressed (CMP=0), which removes the CE2
// read, and its power, for compressed words. Behind each bank pair, a
// context_decoder places the fields back in their PE-side form.
//
// Loading: the host writes one uncompressed 32-bit context word per clock
// (cfg_we, PE number, address). The context_evaluator on the load path
// compresses it when possible; CE1 gets the compressed or upper part, CE2 the
// lower part (written only for uncompressed words) and the CMP table the
// compression bit.
//
// Timing: addresses are fetched in cycle t, and pe_ctrl/exec_valid/exec_iter/
// exec_last describe that context in cycle t+1, when the array executes it.
// The split into CE1/CE2, the CMP-controlled selection of CE2 and the field
// decoding follow the architecture; the load path with an evaluator, the
// one-cycle fetch latency and the loop sequencing are this design's choices.
module config_cache
  import dcca_pkg::*;
#(
  parameter int unsigned NPE   = 40,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned ITW   = 16,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned PW   = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // context load port
  input  logic             cfg_we,
  input  logic [PW-1:0]    cfg_pe,
  input  logic [AW-1:0]    cfg_addr,
  input  logic [CTX_W-1:0] cfg_data,     // uncompressed context word
  // kernel control
  input  logic             start,
  input  logic [AW:0]      ctx_len,
  input  logic [ITW-1:0]   iter_count,
  output logic             busy,
  output logic             done,
  // to the array (cycle after the fetch)
  output pe_ctrl_t         pe_ctrl [NPE],
  output logic             exec_valid,
  output logic [ITW-1:0]   exec_iter,
  output logic             exec_last,
  // bank selects of the current fetch, for activity monitoring
  output logic [NPE-1:0]   ce1_cs,
  output logic [NPE-1:0]   ce2_cs
);

  logic             fetch, last;
  logic [AW-1:0]    addr;
  logic [ITW-1:0]   iter;
  logic [NPE-1:0]   cmp, cmp_q;
  logic             ld_cmp;
  logic [CMP_W-1:0] ld_ce1;
  logic [CE2_W-1:0] ld_ce2;

  cache_control_unit #(.NPE(NPE), .DEPTH(DEPTH), .ITW(ITW)) u_ccu (
    .clk, .rst_n, .start, .ctx_len, .iter_count, .busy, .done,
    .fetch, .addr, .iter, .last, .cmp,
    .cmp_we(cfg_we), .cmp_pe(cfg_pe), .cmp_addr(cfg_addr), .cmp_wdata(ld_cmp)
  );

  context_evaluator u_eval (
    .ctx_in(cfg_data), .compressible(ld_cmp), .cmp_word(ld_ce1), .ce2_word(ld_ce2)
  );

  assign ce1_cs = {NPE{fetch}};
  assign ce2_cs = {NPE{fetch}} & ~cmp;

  for (genvar p = 0; p < NPE; p++) begin : g_pe
    logic [CMP_W-1:0] ce1_q;
    logic [CE2_W-1:0] ce2_q;
    logic             sel;

    assign sel = cfg_we && (cfg_pe == PW'(p));

    cache_element #(.WIDTH(CMP_W), .DEPTH(DEPTH)) u_ce1 (
      .clk, .rst_n, .cs(ce1_cs[p]), .raddr(addr), .rdata(ce1_q),
      .we(sel), .waddr(cfg_addr), .wdata(ld_ce1)
    );

    cache_element #(.WIDTH(CE2_W), .DEPTH(DEPTH)) u_ce2 (
      .clk, .rst_n, .cs(ce2_cs[p]), .raddr(addr), .rdata(ce2_q),
      .we(sel && !ld_cmp), .waddr(cfg_addr), .wdata(ld_ce2)
    );

    context_decoder u_dec (
      .ce1_data(ce1_q), .ce2_data(ce2_q), .cmp(cmp_q[p]), .ctrl(pe_ctrl[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmp_q      <= '0;
      exec_valid <= 1'b0;
      exec_iter  <= '0;
      exec_last  <= 1'b0;
    end else begin
      if (fetch) cmp_q <= cmp;
      exec_valid <= fetch;
      exec_iter  <= iter;
      exec_last  <= last;
    end
  end

endmodule
