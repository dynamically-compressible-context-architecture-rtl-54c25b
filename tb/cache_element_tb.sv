// cache_element_tb: writes random words, then reads them back with cs=1 and
// checks the one-clock read latency; checks that rdata holds its value when
// cs=0 even though the address changes; checks the reset value.
module cache_element_tb;
  localparam int W = 14, D = 16;
  logic clk = 0, rst_n = 0;
  logic cs = 0, we = 0;
  logic [3:0] raddr = '0, waddr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  cache_element #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .cs, .raddr, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [W-1:0] exp, input string what);
    checks++;
    if (rdata !== exp) begin failures++; $display("%s: rdata %h expected %h", what, rdata, exp); end
  endtask

  initial begin
    @(negedge clk);
    chk('0, "reset");
    rst_n = 1;
    for (int a = 0; a < D; a++) begin
      we = 1; waddr = 4'(a); wdata = W'($urandom()); ref_mem[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int k = 0; k < 64; k++) begin
      int a;
      a = $urandom_range(D - 1);
      cs = 1; raddr = 4'(a);
      @(negedge clk);
      chk(ref_mem[a], "read");
      // deselected: address moves, data must hold
      cs = 0; raddr = raddr + 4'd1;
      @(negedge clk);
      chk(ref_mem[a], "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
