// cache_control_unit_tb: loads a random CMP table, runs kernels of several
// lengths and iteration counts, and checks cycle by cycle that addresses
// 0..len-1 are fetched in order with no gap, that iter and last are right,
// that CMP matches the table for the fetched address, that done pulses with
// the final fetch and that a run takes exactly len*iterations clocks.
module cache_control_unit_tb;
  localparam int NPE = 6, D = 8;
  logic clk = 0, rst_n = 0;
  logic start = 0;
  logic [3:0] ctx_len = '0;
  logic [15:0] iter_count = '0;
  logic busy, done, fetch, last;
  logic [2:0] addr;
  logic [15:0] iter;
  logic [NPE-1:0] cmp;
  logic cmp_we = 0, cmp_wdata = 0;
  logic [2:0] cmp_pe = '0, cmp_addr = '0;
  logic [NPE-1:0] tab [D];
  int checks = 0, failures = 0;

  cache_control_unit #(.NPE(NPE), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  task automatic run(input int len, input int its);
    int cycles = 0;
    ctx_len = 4'(len); iter_count = 16'(its); start = 1;
    @(negedge clk); start = 0;
    for (int i = 0; i < its; i++) begin
      for (int a = 0; a < len; a++) begin
        chk(fetch && busy, "fetch missing");
        chk(addr == 3'(a), $sformatf("addr %0d expected %0d", addr, a));
        chk(iter == 16'(i), "iter");
        chk(last == (a == len - 1), "last");
        chk(cmp == tab[a], $sformatf("cmp %b expected %b", cmp, tab[a]));
        chk(done == (a == len - 1 && i == its - 1), "done");
        cycles++;
        @(negedge clk);
      end
    end
    chk(!busy && !fetch && cmp == '0, "still busy after run");
    chk(cycles == len * its, "cycle count");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < D; a++) begin
      tab[a] = NPE'($urandom());
      for (int p = 0; p < NPE; p++) begin
        cmp_we = 1; cmp_pe = 3'(p); cmp_addr = 3'(a); cmp_wdata = tab[a][p];
        @(negedge clk);
      end
    end
    cmp_we = 0;
    run(8, 3);
    run(1, 4);
    run(5, 1);
    // start with zero length must not run
    ctx_len = 0; iter_count = 3; start = 1;
    @(negedge clk); start = 0;
    chk(!busy, "zero-length kernel started");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
