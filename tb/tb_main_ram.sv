// tb_main_ram: writes pseudo-random words to scattered addresses of the
// image memory (first, last and random locations) and reads them back,
// checking the one-cycle read latency and that re = 0 holds the output.
module tb_main_ram;
  logic clk = 0, re = 0, we = 0;
  logic [18:0] raddr, waddr;
  logic [63:0] rdata, wdata;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  main_ram dut (.*);

  logic [18:0] a [64];
  logic [63:0] v [64];

  initial begin
    for (int n = 0; n < 64; n++) begin
      a[n] = (n == 0) ? 19'd0 : (n == 1) ? 19'd393215 : 19'($urandom_range(0, 393215));
      for (int m = 0; m < n; m++) if (a[m] == a[n]) a[n] = 19'(n * 6000 + 7);
      v[n] = {$urandom, $urandom};
    end
    for (int n = 0; n < 64; n++) begin
      @(negedge clk); we = 1; waddr = a[n]; wdata = v[n];
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 64; n++) begin
      @(negedge clk); re = 1; raddr = a[n];
      @(negedge clk); re = 0; raddr = a[(n + 1) % 64];
      checks++;
      if (rdata !== v[n]) begin failures++; $display("addr %0d got %h exp %h", a[n], rdata, v[n]); end
      @(negedge clk);
      checks++;
      if (rdata !== v[n]) failures++;   // held while re = 0
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
