// frame_buffer: the data buffer between the host and the PE array.
//
// Input bank: DEPTH entries, each holding two 16-bit operands (A and B) for
// every row. The host writes one operand per clock. The array side reads a
// whole entry combinationally at rd_addr and drives the row buses bus_a and
// bus_b with it. Output bank: DEPTH entries of one 16-bit result per row,
// written a whole entry at a time by the array side (res_we) and read by the
// host one value at a time, one clock after the address (host_rdata).
//
// The architecture only names a frame/data buffer that supplies operands; the
// two banks, the per-row organisation and the ports are this design's choices.
module frame_buffer
  import dcca_pkg::*;
#(
  parameter int unsigned ROWS  = 8,
  parameter int unsigned DEPTH = 64,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // host write into the input bank
  input  logic              host_we,
  input  logic [AW-1:0]     host_waddr,
  input  logic [RW-1:0]     host_wrow,
  input  logic              host_wsel,    // 0: operand A, 1: operand B
  input  logic [DATA_W-1:0] host_wdata,
  // host read from the output bank
  input  logic [AW-1:0]     host_raddr,
  input  logic [RW-1:0]     host_rrow,
  output logic [DATA_W-1:0] host_rdata,
  // array side
  input  logic [AW-1:0]     rd_addr,
  output logic [DATA_W-1:0] bus_a [ROWS],
  output logic [DATA_W-1:0] bus_b [ROWS],
  input  logic              res_we,
  input  logic [AW-1:0]     res_addr,
  input  logic [DATA_W-1:0] res_data [ROWS]
);

  logic [DATA_W-1:0] in_a  [DEPTH][ROWS];
  logic [DATA_W-1:0] in_b  [DEPTH][ROWS];
  logic [DATA_W-1:0] res_m [DEPTH][ROWS];

  always_ff @(posedge clk) begin
    if (host_we && !host_wsel) in_a[host_waddr][host_wrow] <= host_wdata;
    if (host_we &&  host_wsel) in_b[host_waddr][host_wrow] <= host_wdata;
    if (res_we) res_m[res_addr] <= res_data;
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) begin
      bus_a[r] = in_a[rd_addr][r];
      bus_b[r] = in_b[rd_addr][r];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) host_rdata <= '0;
    else        host_rdata <= res_m[host_raddr][host_rrow];
  end

endmodule
