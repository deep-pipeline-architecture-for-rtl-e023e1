// tb_mcc_ctrl: drives MCC-Ctrl with random fetch tags (random kinds, word
// indices and valid gaps) and checks its strobes against the rules of the
// three-stage MCC:
//  - seld_rst on the first row of each row pair (even p) at the input;
//  - tag1/tag3 are the input tag delayed by 1 and 3 cycles;
//  - d_valid one cycle after the second row of a pair of a G block;
//  - at stage 3 (tag2): sel_rst on the first row of a range block
//    (p mod 8 = 0), seld_acc_rst on the first pair of a block (p = 1),
//    dacc_en on the second row of a pair of a G block;
//  - mu_r_valid after the 8th row of any range (tag3.p mod 8 = 7),
//    mu_d_valid after the last word of a G block (tag3.p = 31).
module tb_mcc_ctrl;
  import fcic_pkg::*;
  logic clk = 0, rst_n = 0;
  fetch_tag_t tag0, tag1, tag3;
  logic seld_rst, sel_rst, seld_acc_rst, dacc_en, d_valid, mu_r_valid, mu_d_valid;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mcc_ctrl dut (.*);

  fetch_tag_t h[4];   // h[n] = tag0 n cycles ago
  function automatic bit is_g(fetch_tag_t t);
    return t.kind == K_RG || t.kind == K_DG;
  endfunction

  initial begin
    tag0 = '0;
    foreach (h[n]) h[n] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      tag0 = fetch_tag_t'({$urandom, $urandom});
      tag0.valid = $urandom_range(0, 5) != 0;
      #1;
      checks++;
      if (seld_rst != !tag0.p[0] || tag1 !== h[1] || tag3 !== h[3] ||
          d_valid != (h[1].valid && h[1].p[0] && is_g(h[1])) ||
          sel_rst != (h[2].p[2:0] == 0) || seld_acc_rst != (h[2].p == 1) ||
          dacc_en != (h[2].valid && h[2].p[0] && is_g(h[2])) ||
          mu_r_valid != (h[3].valid && h[3].p[2:0] == 7) ||
          mu_d_valid != (h[3].valid && h[3].p == 31 && is_g(h[3]))) begin
        failures++;
        if (failures < 5) $display("cycle %0d: wrong strobes", n);
      end
      @(posedge clk);
      h[3] = h[2]; h[2] = h[1]; h[1] = tag0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
