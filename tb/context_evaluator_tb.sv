// context_evaluator_tb: random and directed 32-bit context words.
// The expected compressibility follows the field concurrency rule written out
// by hand: MUX_B excludes SHIFT and REG_FILE; PRED excludes SAT
// and SHIFT; SAT excludes SHIFT; SHIFT excludes REG_FILE. For compressible
// words every enabled field is read back from its compressed position
// (literal bit numbers) and compared with the original; disabled fields must
// read zero. For the others, CE1 must be the upper 18 bits and CE2 the lower
// 14 bits of the word.
module context_evaluator_tb;
  logic [31:0] w;
  logic        compressible;
  logic [17:0] cw;
  logic [13:0] c2;
  int checks = 0, failures = 0;
  int n_cmp = 0, n_unc = 0;

  context_evaluator dut (.ctx_in(w), .compressible, .cmp_word(cw), .ce2_word(c2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] word);
    logic mb, pr, sa, sh, rf, exp_c;
    logic [5:0] zone;
    w = word;
    #1;
    mb = word[31];
    pr = word[30] & word[29];
    sa = word[26];
    sh = word[25];
    rf = word[24];
    exp_c = !((mb & (sh | rf)) | (pr & (sa | sh)) | (sa & sh) | (sh & rf));
    checks++;
    if (compressible !== exp_c) begin
      failures++; $display("word %h: compressible %0b expected %0b", word, compressible, exp_c);
    end
    if (exp_c) begin
      n_cmp++;
      checks++;
      if (cw[17:6] !== word[31:20]) begin failures++; $display("word %h: head %h", word, cw[17:6]); end
      // rebuild the supplementary zone from the fields that are enabled
      zone = '0;
      if (mb) zone[5:2] = word[19:16];
      if (pr) zone[1:0] = word[15:14];
      if (sa) zone[1:0] = word[13:12];
      if (sh) zone[5:1] = word[11:7];
      if (rf) zone[3:2] = word[6:5];
      checks++;
      if (cw[5:0] !== zone) begin
        failures++; $display("word %h: zone %b expected %b", word, cw[5:0], zone);
      end
    end else begin
      n_unc++;
      checks += 2;
      if (cw !== word[31:14]) begin failures++; $display("word %h: ce1 %h", word, cw); end
      if (c2 !== word[13:0])  begin failures++; $display("word %h: ce2 %h", word, c2); end
    end
  endtask

  initial begin
    // directed: ADD with SAT (fits), ADD with SHIFT (does not), PASS with SHIFT (fits),
    // PADD (MUX_B and PRED, the longest compressed combination), SEL with SAT (does not)
    check({5'b10000, 3'b100, 4'h9, 4'ha, 2'b00, 2'b11, 5'b0, 2'b0, 5'b0});
    check({5'b10000, 3'b010, 4'h9, 4'ha, 2'b00, 2'b00, 5'b10011, 2'b0, 5'b0});
    check({5'b00000, 3'b010, 4'h9, 4'h0, 2'b00, 2'b00, 5'b10011, 2'b0, 5'b0});
    check({5'b11101, 3'b000, 4'h1, 4'h2, 2'b10, 2'b00, 5'b0, 2'b0, 5'b10101});
    check({5'b11100, 3'b100, 4'h1, 4'h2, 2'b10, 2'b01, 5'b0, 2'b0, 5'b0});
    // PMOV with REG_FILE write and PRED (fits)
    check({5'b01100, 3'b001, 4'h3, 4'h0, 2'b11, 2'b00, 5'b0, 2'b10, 5'b0});
    for (int i = 0; i < 4000; i++) check($urandom());
    checks++;
    if (n_cmp < 100 || n_unc < 100) begin
      failures++; $display("too few of one kind: %0d compressed, %0d not", n_cmp, n_unc);
    end
    $display("compressible %0d, not compressible %0d", n_cmp, n_unc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
