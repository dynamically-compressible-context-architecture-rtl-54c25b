// frame_buffer_tb: host writes random operands, the array-side read port must
// show them on the row buses for the addressed entry; results written by the
// array side must be read back by the host one clock after the address.
module frame_buffer_tb;
  localparam int R = 4, D = 8;
  logic clk = 0, rst_n = 0;
  logic host_we = 0, host_wsel = 0;
  logic [2:0] host_waddr = '0, host_raddr = '0, rd_addr = '0, res_addr = '0;
  logic [1:0] host_wrow = '0, host_rrow = '0;
  logic [15:0] host_wdata = '0, host_rdata;
  logic [15:0] bus_a [R], bus_b [R], res_data [R];
  logic res_we = 0;
  logic [15:0] ra [D][R], rb [D][R], rr [D][R];
  int checks = 0, failures = 0;

  frame_buffer #(.ROWS(R), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < R; r++) res_data[r] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < D; a++)
      for (int r = 0; r < R; r++)
        for (int s = 0; s < 2; s++) begin
          host_we = 1; host_waddr = 3'(a); host_wrow = 2'(r); host_wsel = 1'(s);
          host_wdata = 16'($urandom());
          if (s == 0) ra[a][r] = host_wdata; else rb[a][r] = host_wdata;
          @(negedge clk);
        end
    host_we = 0;
    for (int a = D - 1; a >= 0; a--) begin
      rd_addr = 3'(a);
      #1;
      for (int r = 0; r < R; r++) begin
        checks += 2;
        if (bus_a[r] !== ra[a][r]) begin failures++; $display("bus_a[%0d] @%0d", r, a); end
        if (bus_b[r] !== rb[a][r]) begin failures++; $display("bus_b[%0d] @%0d", r, a); end
      end
    end
    @(negedge clk);
    for (int a = 0; a < D; a++) begin
      res_we = 1; res_addr = 3'(a);
      for (int r = 0; r < R; r++) begin res_data[r] = 16'($urandom()); rr[a][r] = res_data[r]; end
      @(negedge clk);
    end
    res_we = 0;
    for (int k = 0; k < 40; k++) begin
      int a, r;
      a = $urandom_range(D - 1);
      r = $urandom_range(R - 1);
      host_raddr = 3'(a); host_rrow = 2'(r);
      @(negedge clk);
      checks++;
      if (host_rdata !== rr[a][r]) begin failures++; $display("host read %0d/%0d: %h", a, r, host_rdata); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
