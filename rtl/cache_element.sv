// cache_element: one bank of context memory (CE1 or CE2 of a PE).
//
// DEPTH words of WIDTH bits. A read happens only in a cycle in which the
// element is selected (cs=1): the word at raddr appears on rdata one clock
// later and then holds until the next selected read, so a deselected element
// neither toggles its array nor its output. That is what makes an unread CE2
// save power under compression. Writes come from the context loader
// (we=1, one word per clock) and do not need cs.
//
// The chip-select behaviour follows the architecture (CE2 not selected while
// CMP=1); the one-cycle synchronous read and the separate write port are this
// design's choice. rdata resets to zero.
module cache_element #(
  parameter int unsigned WIDTH = 18,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // run-time read port
  input  logic             cs,     // element selected for a read this cycle
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,  // valid the cycle after cs
  // load port
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  rdata <= '0;
    else if (cs) rdata <= mem[raddr];
  end

endmodule
