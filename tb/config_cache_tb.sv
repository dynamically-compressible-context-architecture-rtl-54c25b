// config_cache_tb: loads random uncompressed context words for every PE and
// address, runs the cache for two iterations and checks, for every executed
// context, that each PE receives the fields of the word that was loaded
// (disabled fields as zero), that CE2 of a PE is selected exactly when its
// word could not be compressed, that CE1 is always selected, and that the
// contexts arrive one per clock starting one clock after the first fetch.
module config_cache_tb;
  import dcca_pkg::*;
  localparam int NPE = 4, D = 8, ITS = 2;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [1:0] cfg_pe = '0;
  logic [2:0] cfg_addr = '0;
  logic [31:0] cfg_data = '0;
  logic start = 0;
  logic [3:0] ctx_len = '0;
  logic [15:0] iter_count = '0;
  logic busy, done, exec_valid, exec_last;
  logic [15:0] exec_iter;
  pe_ctrl_t pe_ctrl [NPE];
  logic [NPE-1:0] ce1_cs, ce2_cs;
  logic [31:0] words [NPE][D];
  int checks = 0, failures = 0;
  int n_cmp = 0, n_unc = 0, ce2_reads = 0, ce1_reads = 0;

  config_cache #(.NPE(NPE), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit fits(input logic [31:0] w);
    bit mb, pr, sa, sh, rf;
    mb = w[31]; pr = w[30] & w[29]; sa = w[26]; sh = w[25]; rf = w[24];
    return !((mb & (sh | rf)) | (pr & (sa | sh)) | (sa & sh) | (sh & rf));
  endfunction

  function automatic pe_ctrl_t expected(input logic [31:0] w);
    pe_ctrl_t e;
    e = '0;
    e.alu_op = alu_op_e'(w[31:27]);
    e.sat_en = w[26]; e.shift_en = w[25]; e.rf_we = w[24];
    e.mux_a = w[23:20];
    e.mux_b_en = w[31]; e.pred_en = w[30] & w[29];
    if (e.mux_b_en) e.mux_b = w[19:16];
    if (e.pred_en)  e.pred  = w[15:14];
    if (e.sat_en)   e.sat   = w[13:12];
    if (e.shift_en) e.shift = w[11:7];
    if (e.rf_we)    e.rf_wa = w[6:5];
    return e;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPE; p++)
      for (int a = 0; a < D; a++) begin
        words[p][a] = $urandom();
        cfg_we = 1; cfg_pe = 2'(p); cfg_addr = 3'(a); cfg_data = words[p][a];
        @(negedge clk);
      end
    cfg_we = 0;
    ctx_len = 4'(D); iter_count = 16'(ITS); start = 1;
    @(negedge clk);
    start = 0;
    // first fetch cycle: check selects for address 0
    for (int i = 0; i < ITS; i++)
      for (int a = 0; a < D; a++) begin
        // fetch of address a is in this cycle
        for (int p = 0; p < NPE; p++) begin
          checks += 2;
          if (ce1_cs[p] !== 1'b1) begin failures++; $display("ce1 not selected"); end
          if (ce2_cs[p] !== !fits(words[p][a])) begin
            failures++; $display("pe %0d addr %0d: ce2_cs %0b", p, a, ce2_cs[p]);
          end
          if (ce2_cs[p]) ce2_reads++;
          ce1_reads++;
          if (fits(words[p][a])) n_cmp++; else n_unc++;
        end
        @(negedge clk);
        checks += 3;
        if (!exec_valid) begin failures++; $display("exec_valid missing"); end
        if (exec_iter != 16'(i)) begin failures++; $display("exec_iter"); end
        if (exec_last != (a == D - 1)) begin failures++; $display("exec_last"); end
        for (int p = 0; p < NPE; p++) begin
          checks++;
          if (pe_ctrl[p] !== expected(words[p][a])) begin
            failures++;
            $display("pe %0d addr %0d word %h (fits %0b): got %h expected %h", p, a,
                     words[p][a], fits(words[p][a]), pe_ctrl[p], expected(words[p][a]));
          end
        end
      end
    @(negedge clk);
    checks++;
    if (exec_valid || busy) begin failures++; $display("did not stop"); end
    checks++;
    if (n_cmp == 0 || n_unc == 0) begin failures++; $display("only one kind of word"); end
    $display("CE1 reads %0d, CE2 reads %0d", ce1_reads, ce2_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
