// tb_rd_shift_reg: pushes a random word and tag every cycle and checks that
// each leaves the output exactly 12 cycles later and the tap 11 cycles
// later, and that reset clears the tags.
module tb_rd_shift_reg;
  logic clk = 0, rst_n = 0;
  logic [63:0] in_data, out_data;
  logic [26:0] in_tag, tap_tag, out_tag;
  logic [63:0] hd [$];
  logic [26:0] ht [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  rd_shift_reg #(.DEPTH(12), .DW(64), .TW(27)) dut (.*);

  initial begin
    in_data = 0; in_tag = 0;
    repeat (2) @(negedge clk);
    checks++;
    if (out_tag != 0 || tap_tag != 0) failures++;
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      if (ht.size() >= 12) begin
        checks++;
        if (out_data !== hd[ht.size()-12] || out_tag !== ht[ht.size()-12]) failures++;
        checks++;
        if (tap_tag !== ht[ht.size()-11]) failures++;
      end
      in_data = {$urandom, $urandom}; in_tag = 27'($urandom);
      hd.push_back(in_data); ht.push_back(in_tag);
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
