// cache_control_unit: sequences the configuration cache and supplies the
// compression information (CMP) of every PE's current context word.
//
// After start, the unit reads context addresses 0 .. ctx_len-1 once per
// iteration, for iter_count iterations, one address per clock, with no gaps
// (one reconfiguration of the whole array per cycle). For each fetched
// address it outputs the per-PE CMP bit, read combinationally from its CMP
// table, so the cache can deselect CE2 of every PE whose word is compressed in
// the same cycle. The table holds one bit per PE and context address, written
// by the context loader. done pulses for one clock with the last fetch.
//
// That the cache control unit provides CMP to the cache elements follows the
// architecture; the loop sequencing (context count, iteration count) is this
// design's own, simplest choice. Reset clears the table and returns to idle.
// Assertions check that a kernel fits the context depth and that contexts
// are not loaded while a kernel runs.
module cache_control_unit #(
  parameter int unsigned NPE   = 40,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned ITW   = 16,   // width of the iteration counter
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned PW   = (NPE > 1) ? $clog2(NPE) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  // kernel control
  input  logic           start,       // pulse; ignored while busy
  input  logic [AW:0]    ctx_len,     // contexts per iteration, 1..DEPTH
  input  logic [ITW-1:0] iter_count,  // iterations, >= 1
  output logic           busy,
  output logic           done,        // one-clock pulse with the last fetch
  // fetch outputs (same cycle as the cache read)
  output logic           fetch,       // a context address is read this cycle
  output logic [AW-1:0]  addr,
  output logic [ITW-1:0] iter,        // iteration of the fetched context
  output logic           last,        // last context of the iteration
  output logic [NPE-1:0] cmp,         // CMP per PE for addr
  // CMP table load port
  input  logic           cmp_we,
  input  logic [PW-1:0]  cmp_pe,
  input  logic [AW-1:0]  cmp_addr,
  input  logic           cmp_wdata
);

  logic [NPE-1:0] cmp_tab [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int a = 0; a < DEPTH; a++) cmp_tab[a] <= '0;
    end else if (cmp_we) begin
      cmp_tab[cmp_addr][cmp_pe] <= cmp_wdata;
    end
  end

  assign fetch = busy;
  assign last  = busy && ({1'b0, addr} == ctx_len - 1'b1);
  assign done  = last && (iter == iter_count - 1'b1);
  assign cmp   = busy ? cmp_tab[addr] : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      addr <= '0;
      iter <= '0;
    end else if (!busy) begin
      addr <= '0;
      iter <= '0;
      if (start && ctx_len != 0 && iter_count != 0) busy <= 1'b1;
    end else if (last) begin
      addr <= '0;
      iter <= iter + 1'b1;
      if (done) busy <= 1'b0;
    end else begin
      addr <= addr + 1'b1;
    end
  end

  // A kernel may use at most DEPTH context addresses.
  a_len_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    (start && !busy) |-> (ctx_len <= (AW+1)'(DEPTH)))
    else $error("ctx_len %0d exceeds the context depth", ctx_len);

  // The CMP table must not change under a running kernel.
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !cmp_we)
    else $error("CMP table written while a kernel runs");

endmodule
