// context_decoder_tb: builds CE1/CE2 contents by hand, in both the
// uncompressed and the compressed format, from random field values, and checks
// that the decoder delivers every enabled field unchanged and every disabled
// field as zero. Compressed words are only built for field combinations that
// fit (see context_evaluator_tb for the rule). In compressed mode CE2 is fed
// random garbage, which must have no effect.
module context_decoder_tb;
  import dcca_pkg::*;
  logic [17:0] ce1;
  logic [13:0] ce2;
  logic        cmp;
  pe_ctrl_t    ctrl;
  int checks = 0, failures = 0;
  int n_cmp = 0;

  context_decoder dut (.ce1_data(ce1), .ce2_data(ce2), .cmp, .ctrl);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++; $display("%s: got %0d expected %0d (cmp=%0b)", what, got, exp, cmp);
    end
  endtask

  initial begin
    logic [4:0] op; logic sa, sh, rf, mb, pr;
    logic [3:0] ma, mbv; logic [1:0] pv, sv, rv; logic [4:0] shv;
    logic fits;
    for (int i = 0; i < 4000; i++) begin
      op = 5'($urandom()); sa = 1'($urandom()); sh = 1'($urandom()); rf = 1'($urandom());
      ma = 4'($urandom()); mbv = 4'($urandom()); pv = 2'($urandom());
      sv = 2'($urandom()); shv = 5'($urandom()); rv = 2'($urandom());
      mb = op[4]; pr = op[3] & op[2];
      fits = !((mb & (sh | rf)) | (pr & (sa | sh)) | (sa & sh) | (sh & rf));
      if (fits && ($urandom() % 2 == 0)) begin
        cmp = 1'b1; n_cmp++;
        ce1 = {op, sa, sh, rf, ma, 6'b0};
        if (mb) ce1[5:2] = mbv;
        if (pr) ce1[1:0] = pv;
        if (sa) ce1[1:0] = sv;
        if (sh) ce1[5:1] = shv;
        if (rf) ce1[3:2] = rv;
        ce2 = 14'($urandom());
      end else begin
        cmp = 1'b0;
        ce1 = {op, sa, sh, rf, ma, mbv, pv};
        ce2 = {sv, shv, rv, 5'($urandom())};
      end
      #1;
      expect_eq("alu_op",   int'(ctrl.alu_op), int'(op));
      expect_eq("mux_a",    int'(ctrl.mux_a), int'(ma));
      expect_eq("mux_b_en", int'(ctrl.mux_b_en), int'(mb));
      expect_eq("mux_b",    int'(ctrl.mux_b), mb ? int'(mbv) : 0);
      expect_eq("pred_en",  int'(ctrl.pred_en), int'(pr));
      expect_eq("pred",     int'(ctrl.pred), pr ? int'(pv) : 0);
      expect_eq("sat_en",   int'(ctrl.sat_en), int'(sa));
      expect_eq("sat",      int'(ctrl.sat), sa ? int'(sv) : 0);
      expect_eq("shift_en", int'(ctrl.shift_en), int'(sh));
      expect_eq("shift",    int'(ctrl.shift), sh ? int'(shv) : 0);
      expect_eq("rf_we",    int'(ctrl.rf_we), int'(rf));
      expect_eq("rf_wa",    int'(ctrl.rf_wa), rf ? int'(rv) : 0);
    end
    expect_eq("compressed cases seen", int'(n_cmp > 200), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
