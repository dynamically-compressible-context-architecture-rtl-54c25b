// dcca_cgra_top_tb: end-to-end run of the whole architecture at its default
// size (8x5 array, 32 context addresses, 64 frame-buffer entries).
//
// Kernel (5 contexts per iteration, 64 iterations, the same in every row r;
// a = operand A, b = operand B of row r in iteration i; PEs not named do NOP):
//   ctx0  col0: ADD  busA, busB, saturate s16           (compressed)
//   ctx1  col1: PASS W, shift left 1, write RF[1]       (not compressible)
//   ctx2  col2: SUB  W, busA, saturate s8               (compressed)
//   ctx3  col3: MUL  W, busB, shift right 2             (not compressible)
//         col4: SLT  busA, busB  -> predicate flag      (compressed)
//   ctx4  col4: PADD W, busA if flag, else hold         (compressed, PRED)
// The result of col4 is stored in result entry i, row r. The testbench
// computes the expected result with integer arithmetic, checks every result,
// the number of clocks from start to done (5*64 + 2), the number of CE2 and
// CE1 reads, and counts each mechanism: compressed and uncompressed contexts,
// saturation that clamps, predicated hold and predicated write, several
// iterations; one that never happens counts as a failure.
module dcca_cgra_top_tb;
  import dcca_pkg::*;
  localparam int R = 8, C = 5, N = 40, LEN = 5, ITS = 64;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [5:0] cfg_pe = '0;
  logic [4:0] cfg_addr = '0;
  logic [31:0] cfg_data = '0;
  logic fb_we = 0, fb_wsel = 0;
  logic [6:0] fb_waddr = '0, fb_raddr = '0;
  logic [2:0] fb_wrow = '0, fb_rrow = '0;
  logic [15:0] fb_wdata = '0, fb_rdata;
  logic start = 0;
  logic [5:0] ctx_len = '0;
  logic [15:0] iter_count = '0;
  logic busy, done;
  logic [N-1:0] ce1_cs, ce2_cs;
  int checks = 0, failures = 0;
  int av [ITS][R], bv [ITS][R], expv [ITS][R];
  int ce1_reads = 0, ce2_reads = 0, cycles = 0;
  int n_sat8 = 0, n_sat16 = 0, n_hold = 0, n_pwrite = 0;

  dcca_cgra_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    ce1_reads <= ce1_reads + $countones(ce1_cs);
    ce2_reads <= ce2_reads + $countones(ce2_cs);
  end

  function automatic logic [31:0] word(input logic [4:0] op, input bit sat_en, shift_en, wdb,
      input logic [3:0] ma, mb, input logic [1:0] pr, sat, input logic [4:0] sh, input logic [1:0] rf);
    return {op, sat_en, shift_en, wdb, ma, mb, pr, sat, sh, rf, 5'b0};
  endfunction

  function automatic int s16(input int v);
    return ((v & 32'h8000) != 0) ? (v | 32'hFFFF0000) : (v & 32'hFFFF);
  endfunction

  function automatic logic [31:0] program_word(input int k, input int c);
    logic [31:0] nop;
    nop = word(5'b00100, 0, 0, 0, 4'd0, 4'd0, 2'd0, 2'd0, 5'd0, 2'd0);
    case (k)
      0: return (c == 0) ? word(5'b10000, 1, 0, 0, 4'd9, 4'd10, 2'd0, 2'd2, 5'd0, 2'd0) : nop;
      1: return (c == 1) ? word(5'b00000, 0, 1, 1, 4'd7, 4'd0, 2'd0, 2'd0, 5'b00001, 2'd1) : nop;
      2: return (c == 2) ? word(5'b10001, 1, 0, 0, 4'd7, 4'd9, 2'd0, 2'd0, 5'd0, 2'd0) : nop;
      3: if (c == 3) return word(5'b10010, 0, 1, 0, 4'd7, 4'd10, 2'd0, 2'd0, 5'b10010, 2'd0);
         else if (c == 4) return word(5'b10110, 0, 0, 0, 4'd9, 4'd10, 2'd0, 2'd0, 5'd0, 2'd0);
         else return nop;
      default: return (c == 4) ? word(5'b11101, 0, 0, 0, 4'd7, 4'd9, 2'd0, 2'd0, 5'd0, 2'd0) : nop;
    endcase
  endfunction

  initial begin
    int x0, x1, x2, x3, raw;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // contexts
    for (int p = 0; p < N; p++)
      for (int k = 0; k < LEN; k++) begin
        cfg_we = 1; cfg_pe = 6'(p); cfg_addr = 5'(k); cfg_data = program_word(k, p % C);
        @(negedge clk);
      end
    cfg_we = 0;
    // operands and expected results
    for (int i = 0; i < ITS; i++)
      for (int r = 0; r < R; r++) begin
        if ($urandom() % 8 == 0) begin
          av[i][r] = s16($urandom()); bv[i][r] = s16($urandom());
        end else begin
          av[i][r] = $urandom_range(0, 400) - 200; bv[i][r] = $urandom_range(0, 400) - 200;
        end
        raw = av[i][r] + bv[i][r];
        x0 = raw > 32767 ? 32767 : (raw < -32768 ? -32768 : raw);
        if (x0 != raw) n_sat16++;
        x1 = s16(x0 * 2);
        raw = x1 - av[i][r];
        x2 = raw > 127 ? 127 : (raw < -128 ? -128 : raw);
        if (x2 != raw) n_sat8++;
        x3 = s16((x2 * bv[i][r]) >>> 2);
        if (av[i][r] < bv[i][r]) begin expv[i][r] = s16(x3 + av[i][r]); n_pwrite++; end
        else begin expv[i][r] = 0; n_hold++; end
        fb_we = 1; fb_waddr = 7'(i); fb_wrow = 3'(r);
        fb_wsel = 0; fb_wdata = 16'(av[i][r]);
        @(negedge clk);
        fb_wsel = 1; fb_wdata = 16'(bv[i][r]);
        @(negedge clk);
      end
    fb_we = 0;
    // run
    ctx_len = 6'(LEN); iter_count = 16'(ITS); start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    ce1_reads = 0; ce2_reads = 0;
    while (!done) begin
      checks++;
      if (!busy) begin failures++; $display("busy dropped at cycle %0d", cycles); break; end
      @(negedge clk);
      cycles++;
    end
    @(negedge clk);
    checks++;
    if (cycles != LEN * ITS + 2) begin failures++; $display("cycles %0d expected %0d", cycles, LEN * ITS + 2); end
    checks++;
    if (busy) begin failures++; $display("still busy"); end
    // CE2 is read only for the two uncompressible words of each row
    checks += 2;
    if (ce1_reads != N * LEN * ITS) begin failures++; $display("CE1 reads %0d", ce1_reads); end
    if (ce2_reads != 2 * R * ITS) begin failures++; $display("CE2 reads %0d", ce2_reads); end
    $display("context words read: %0d, compressed: %0d (%0d%%)", ce1_reads,
             ce1_reads - ce2_reads, 100 * (ce1_reads - ce2_reads) / ce1_reads);
    // results
    for (int i = 0; i < ITS; i++)
      for (int r = 0; r < R; r++) begin
        fb_raddr = 7'(i); fb_rrow = 3'(r);
        @(negedge clk);
        checks++;
        if (s16(int'(fb_rdata)) != expv[i][r]) begin
          failures++;
          $display("iter %0d row %0d: %0d expected %0d (a=%0d b=%0d)", i, r, $signed(fb_rdata),
                   expv[i][r], av[i][r], bv[i][r]);
        end
      end
    // every mechanism happened
    checks++;
    if (ce2_reads == 0 || ce1_reads == ce2_reads || n_sat8 == 0 || n_sat16 == 0 || n_hold == 0
        || n_pwrite == 0) begin
      failures++; $display("mechanism missing");
    end
    $display("compressed %0d uncompressed %0d sat8 %0d sat16 %0d hold %0d pwrite %0d iterations %0d",
             ce1_reads - ce2_reads, ce2_reads, n_sat8, n_sat16, n_hold, n_pwrite, ITS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
