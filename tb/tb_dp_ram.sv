// tb_dp_ram: checks the dual-port RAM at the RAM D size (16 words): full
// writes, half-word writes with byte enables (as used to merge the two
// halves of a contracted row), one-cycle read latency and a read of one
// address while another is written.
module tb_dp_ram;
  logic clk = 0, we = 0;
  logic [3:0] waddr, raddr;
  logic [7:0] be;
  logic [63:0] wdata, rdata;
  logic [63:0] model [16];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  dp_ram #(.DEPTH(16), .AW(4), .DW(64)) dut (.*);

  initial begin
    raddr = 0;
    for (int n = 0; n < 16; n++) begin
      @(negedge clk); we = 1; waddr = 4'(n); be = 8'hFF; wdata = {$urandom, $urandom}; model[n] = wdata;
    end
    for (int t = 0; t < 300; t++) begin
      logic [3:0] ra;
      @(negedge clk);
      we = ($urandom_range(0, 1) == 1);
      waddr = 4'($urandom); be = ($urandom_range(0, 1) == 1) ? 8'h0F : 8'hF0;
      if (t % 7 == 0) be = 8'($urandom);
      wdata = {$urandom, $urandom};
      ra = 4'($urandom);
      if (we && ra == waddr) ra = ra + 4'd1;
      raddr = ra;
      @(posedge clk);
      #1;
      checks++;
      if (rdata !== model[ra]) begin failures++; $display("raddr %0d got %h exp %h", ra, rdata, model[ra]); end
      if (we) for (int b = 0; b < 8; b++) if (be[b]) model[waddr][8*b +: 8] = wdata[8*b +: 8];
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
