// tb_fc_sad_ram: fills all 256 words of the FC-SAD RAM with random 29-bit
// values, then reads them back in random order while overwriting others,
// checking the one-cycle read latency.
module tb_fc_sad_ram;
  logic clk = 0, we = 0;
  logic [7:0] waddr, raddr;
  logic [28:0] wdata, rdata;
  logic [28:0] model [256];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  fc_sad_ram dut (.*);

  initial begin
    raddr = 0;
    for (int n = 0; n < 256; n++) begin
      @(negedge clk); we = 1; waddr = 8'(n); wdata = 29'($urandom); model[n] = wdata;
    end
    for (int t = 0; t < 600; t++) begin
      logic [7:0] ra;
      @(negedge clk);
      we = ($urandom_range(0, 2) == 0); waddr = 8'($urandom); wdata = 29'($urandom);
      ra = 8'($urandom);
      if (we && ra == waddr) ra = ra + 8'd1;
      raddr = ra;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[ra]) failures++;
      if (we) model[waddr] = wdata;
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
