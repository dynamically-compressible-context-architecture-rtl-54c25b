// dcca_kernels_tb: runs five benchmark-style kernels on the full-size array
// (default parameters) and checks every result against an integer model.
// Every row computes its own independent data stream; operands of iteration i
// come from frame-buffer entry i, results are taken from the east column.
//
//   First_Diff    x[k] = y[k+1] - y[k]               1 context
//   Inner Product q   += z[k] * x[k]  (running sum)  1 context  (MAC)
//   MVM           y[r] += M[r][k] * x[k]             1 context  (MAC; x[k] is
//                                                     the same on every row)
//   Tri-Diagonal  x[k] = z[k] * (y[k] - x[k-1])      2 contexts (neighbour E,
//                                                     recurrence, s16 saturation)
//   SAD           s   += |a[k] - b[k]|               2 contexts (u16 saturation)
//   Quant         q    = sat8((c * f) >>> 4)         2 contexts (MUL with SHIFT
//                                                     cannot be compressed)
//   Dequant       c    = sat16((q * f) << 3)         1 context  (MUL, SHIFT and
//                                                     SAT in one uncompressed word)
//   Complex Mult  (ar + j ai)(br + j bi) on a pair of rows: the even row holds
//                 ar, br on its buses, the odd row ai, bi. Partial products are
//                 exchanged between the rows through the N/S links and the
//                 results travel east: the even row returns the imaginary and
//                 the odd row the real part. 6 contexts.
// For each kernel the testbench reports the share of context reads that were
// compressed (CE2 not read) and checks the clock count L*I+2 from start to
// done. The kernels are mapped onto this design's own PE instruction set.
module dcca_kernels_tb;
  import dcca_pkg::*;
  localparam int R = 8, C = 5, N = 40, ITS = 100;
  typedef enum int {K_FDIFF, K_INNER, K_TRI, K_SAD, K_QUANT, K_DEQUANT, K_CMUL, K_MVM} kernel_e;
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
  int ce1_reads = 0, ce2_reads = 0;

  dcca_cgra_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    ce1_reads <= ce1_reads + $countones(ce1_cs);
    ce2_reads <= ce2_reads + $countones(ce2_cs);
  end

  function automatic logic [31:0] word(input logic [4:0] op, input bit sat_en, shift_en,
      input logic [3:0] ma, mb, input logic [1:0] sat, input logic [4:0] sh);
    return {op, sat_en, shift_en, 1'b0, ma, mb, 2'b0, sat, sh, 2'b0, 5'b0};
  endfunction

  function automatic int s16(input int v);
    return ((v & 32'h8000) != 0) ? (v | 32'hFFFF0000) : (v & 32'hFFFF);
  endfunction

  function automatic int clamp(input int v, input int lo, input int hi);
    return v < lo ? lo : (v > hi ? hi : v);
  endfunction

  function automatic int kernel_len(input kernel_e k);
    case (k)
      K_FDIFF, K_INNER, K_DEQUANT, K_MVM: return 1;
      K_CMUL: return 6;
      default: return 2;
    endcase
  endfunction

  // complex multiply: context of PE (row parity odd, column c) at address a
  function automatic logic [31:0] cmul(input int a, input bit odd, input int c);
    logic [31:0] nop;
    nop = word(5'b00100, 0, 0, 4'd0, 4'd0, 2'd0, 5'd0);
    case (a)
      0: case (c)  // products and operand copies
           0: return word(OP_MUL, 0, 0, SRC_BUSA, SRC_BUSB, 2'd0, 5'd0);
           1: return word(OP_PASS, 0, 0, SRC_BUSA, 4'd0, 2'd0, 5'd0);
           2: return word(OP_PASS, 0, 0, SRC_BUSB, 4'd0, 2'd0, 5'd0);
           default: return nop;
         endcase
      1: if (odd && c == 0) return word(OP_SUB, 0, 0, SRC_N, SRC_SELF, 2'd0, 5'd0);  // real
         else if (odd && c == 1) return word(OP_PASS, 0, 0, SRC_E, 4'd0, 2'd0, 5'd0);  // bi
         else if (odd && c == 2) return word(OP_PASS, 0, 0, SRC_W, 4'd0, 2'd0, 5'd0);  // ai
         else return nop;
      2: if (!odd && (c == 1 || c == 2)) return word(OP_MUL, 0, 0, SRC_SELF, SRC_S, 2'd0, 5'd0);
         else if (odd && c == 1) return word(OP_PASS, 0, 0, SRC_W, 4'd0, 2'd0, 5'd0);
         else return nop;
      3: if (!odd && c == 2) return word(OP_ADD, 0, 0, SRC_SELF, SRC_W, 2'd0, 5'd0);  // imag
         else if (odd && c == 2) return word(OP_PASS, 0, 0, SRC_W, 4'd0, 2'd0, 5'd0);
         else return nop;
      default: if (c == a - 1) return word(OP_PASS, 0, 0, SRC_W, 4'd0, 2'd0, 5'd0);
               else return nop;
    endcase
  endfunction

  // context of PE column c at address a for kernel k (NOP where unused)
  function automatic logic [31:0] prog(input kernel_e k, input int a, input int r, input int c);
    logic [31:0] nop;
    nop = word(5'b00100, 0, 0, 4'd0, 4'd0, 2'd0, 5'd0);
    case (k)
      K_CMUL: return cmul(a, 1'(r % 2), c);
      K_DEQUANT: return (c == 4) ? word(OP_MUL, 1, 1, SRC_BUSA, SRC_BUSB, SAT_S16, 5'b00011) : nop;
      K_FDIFF: return (c == 4) ? word(OP_SUB, 0, 0, SRC_BUSB, SRC_BUSA, 2'd0, 5'd0) : nop;
      K_INNER, K_MVM: return (c == 4) ? word(OP_MAC, 0, 0, SRC_BUSA, SRC_BUSB, 2'd0, 5'd0) : nop;
      K_TRI:
        if (a == 0) return (c == 3) ? word(OP_SUB, 0, 0, SRC_BUSB, SRC_E, 2'd0, 5'd0) : nop;
        else        return (c == 4) ? word(OP_MUL, 1, 0, SRC_W, SRC_BUSA, SAT_S16, 5'd0) : nop;
      K_SAD:
        if (a == 0) return (c == 3) ? word(OP_ABSDIF, 0, 0, SRC_BUSA, SRC_BUSB, 2'd0, 5'd0) : nop;
        else        return (c == 4) ? word(OP_ADD, 1, 0, SRC_W, SRC_SELF, SAT_U16, 5'd0) : nop;
      default:
        if (a == 0) return (c == 4) ? word(OP_MUL, 0, 1, SRC_BUSA, SRC_BUSB, 2'd0, 5'b10100) : nop;
        else        return (c == 4) ? word(OP_PASS, 1, 0, SRC_SELF, 4'd0, SAT_S8, 5'd0) : nop;
    endcase
  endfunction

  task automatic make_data(input kernel_e k);
    int acc [R];
    int y [ITS + 1];
    int xv [ITS];
    for (int i = 0; i < ITS; i++) xv[i] = $urandom_range(0, 400) - 200;
    for (int r = 0; r < R; r++) begin
      acc[r] = 0;
      for (int i = 0; i <= ITS; i++) y[i] = $urandom_range(0, 2000) - 1000;
      for (int i = 0; i < ITS; i++) begin
        case (k)
          K_FDIFF: begin av[i][r] = y[i]; bv[i][r] = y[i + 1]; expv[i][r] = s16(bv[i][r] - av[i][r]); end
          K_INNER: begin
            av[i][r] = $urandom_range(0, 400) - 200; bv[i][r] = $urandom_range(0, 400) - 200;
            acc[r] = s16(acc[r] + av[i][r] * bv[i][r]); expv[i][r] = acc[r];
          end
          K_MVM: begin
            av[i][r] = $urandom_range(0, 400) - 200; bv[i][r] = xv[i];
            acc[r] = s16(acc[r] + av[i][r] * bv[i][r]); expv[i][r] = acc[r];
          end
          K_TRI: begin  // acc holds x[k-1]
            av[i][r] = $urandom_range(0, 6) - 3; bv[i][r] = $urandom_range(0, 2000) - 1000;
            acc[r] = clamp(av[i][r] * s16(bv[i][r] - acc[r]), -32768, 32767);
            expv[i][r] = acc[r];
          end
          K_SAD: begin
            av[i][r] = $urandom_range(0, 255); bv[i][r] = $urandom_range(0, 255);
            acc[r] = clamp(acc[r] + (av[i][r] > bv[i][r] ? av[i][r] - bv[i][r] : bv[i][r] - av[i][r]), 0, 65535);
            expv[i][r] = acc[r];
          end
          K_DEQUANT: begin
            av[i][r] = $urandom_range(0, 400) - 200; bv[i][r] = $urandom_range(0, 64);
            expv[i][r] = clamp((av[i][r] * bv[i][r]) * 8, -32768, 32767);
          end
          K_CMUL: begin
            av[i][r] = $urandom_range(0, 200) - 100; bv[i][r] = $urandom_range(0, 200) - 100;
          end
          default: begin
            av[i][r] = $urandom_range(0, 4000) - 2000; bv[i][r] = $urandom_range(0, 64);
            expv[i][r] = clamp(s16((av[i][r] * bv[i][r]) >>> 4), -128, 127);
          end
        endcase
      end
    end
    if (k == K_CMUL)
      for (int r = 0; r < R; r += 2)
        for (int i = 0; i < ITS; i++) begin
          expv[i][r]     = s16(av[i][r] * bv[i][r + 1] + av[i][r + 1] * bv[i][r]);  // imag
          expv[i][r + 1] = s16(av[i][r] * bv[i][r] - av[i][r + 1] * bv[i][r + 1]);  // real
        end
  endtask

  task automatic run_kernel(input kernel_e k);
    int len, cycles, errs;
    len = kernel_len(k);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < N; p++)
      for (int a = 0; a < len; a++) begin
        cfg_we = 1; cfg_pe = 6'(p); cfg_addr = 5'(a); cfg_data = prog(k, a, p / C, p % C);
        @(negedge clk);
      end
    cfg_we = 0;
    make_data(k);
    for (int i = 0; i < ITS; i++)
      for (int r = 0; r < R; r++) begin
        fb_we = 1; fb_waddr = 7'(i); fb_wrow = 3'(r);
        fb_wsel = 0; fb_wdata = 16'(av[i][r]);
        @(negedge clk);
        fb_wsel = 1; fb_wdata = 16'(bv[i][r]);
        @(negedge clk);
      end
    fb_we = 0;
    ctx_len = 6'(len); iter_count = 16'(ITS); start = 1;
    @(negedge clk);
    start = 0;
    ce1_reads = 0; ce2_reads = 0;
    cycles = 1;
    while (!done && cycles < 10000) begin @(negedge clk); cycles++; end
    @(negedge clk);
    checks++;
    if (cycles != len * ITS + 2) begin failures++; $display("%s: %0d cycles", k.name(), cycles); end
    errs = 0;
    for (int i = 0; i < ITS; i++)
      for (int r = 0; r < R; r++) begin
        fb_raddr = 7'(i); fb_rrow = 3'(r);
        @(negedge clk);
        checks++;
        if (s16(int'(fb_rdata)) != expv[i][r]) begin
          failures++; errs++;
          if (errs < 5) $display("%s iter %0d row %0d: %0d expected %0d", k.name(), i, r,
                                 $signed(fb_rdata), expv[i][r]);
        end
      end
    $display("%-8s contexts/iteration %0d, cycles %0d, context reads %0d, compressed %0d.%0d%%",
             k.name(), len, cycles, ce1_reads, 100 * (ce1_reads - ce2_reads) / ce1_reads,
             (1000 * (ce1_reads - ce2_reads) / ce1_reads) % 10);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run_kernel(K_FDIFF);
    run_kernel(K_INNER);
    run_kernel(K_MVM);
    run_kernel(K_TRI);
    run_kernel(K_SAD);
    run_kernel(K_QUANT);
    // Quant has one uncompressible word per row: 8 of 80 per iteration
    checks++;
    if (ce2_reads != 8 * ITS) begin failures++; $display("Quant CE2 reads %0d", ce2_reads); end
    run_kernel(K_DEQUANT);
    checks++;
    if (ce2_reads != 8 * ITS) begin failures++; $display("Dequant CE2 reads %0d", ce2_reads); end
    run_kernel(K_CMUL);
    checks++;
    if (ce2_reads != 0) begin failures++; $display("Complex Mult CE2 reads %0d", ce2_reads); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
