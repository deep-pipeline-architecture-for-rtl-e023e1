// tb_mcc: streams random 16x16 blocks (32 words, left half rows 0..15 then
// right half, as the fetch order delivers them) into the MCC, driven by its
// controller MCC-Ctrl, with random idle cycles between words. A model keeps
// every block by number and checks:
//  - each contracted word (4 pixels) of a G block one cycle after its
//    second row:
//    floor(2x2 sum / 4);
//  - mu(R_p) three cycles after the last row of each 8x8 range: sum/64;
//  - mu(D) three cycles after the last word of a G block: mean of the 64
//    contracted pixels, sum/64.
// Latencies are those of the published three-stage MCC pipeline.
module tb_mcc;
  import fcic_pkg::*;
  logic clk = 0, rst_n = 0;
  fetch_tag_t tag0, tag1, tag3;
  logic [DW-1:0] data0;
  logic seld_rst, sel_rst, seld_acc_rst, dacc_en, d_valid, mu_r_valid, mu_d_valid;
  logic [3:0][7:0] d_pix;
  logic [7:0] mu_r, mu_d;
  int checks = 0, failures = 0;
  int n_pix = 0, n_mur = 0, n_mud = 0;
  always #5 clk = ~clk;

  mcc_ctrl u_ctl (.*);
  mcc dut (.clk, .rst_n, .in_valid(tag0.valid), .in_data(data0), .seld_rst, .sel_rst, .seld_acc_rst,
           .dacc_en, .d_pix, .mu_r, .mu_d);

  logic [7:0] img[64][16][16];   // block number, row, column

  function automatic int cpix(int b, int r, int c);  // contracted pixel
    return (int'(img[b][2*r][2*c]) + img[b][2*r][2*c+1] + img[b][2*r+1][2*c] + img[b][2*r+1][2*c+1]) / 4;
  endfunction

  always @(posedge clk) if (rst_n) begin
    int b, p, s;
    if (d_valid) begin
      b = tag1.i; p = tag1.p;
      for (int n = 0; n < 4; n++) begin
        checks++;
        if (d_pix[n] != 8'(cpix(b, p[3:1], 4 * p[4] + n))) begin
          failures++;
          if (failures < 5) $display("blk %0d p %0d n %0d: %0d exp %0d", b, p, n, d_pix[n], cpix(b, p[3:1], 4*p[4]+n));
        end
      end
      n_pix++;
    end
    if (mu_r_valid) begin
      b = tag3.i; p = tag3.p;
      s = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) s += img[b][8 * p[3] + r][8 * p[4] + c];
      checks++;
      if (mu_r != 8'(s / 64)) failures++;
      n_mur++;
    end
    if (mu_d_valid) begin
      b = tag3.i;
      s = 0;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) s += cpix(b, r, c);
      checks++;
      if (mu_d != 8'(s / 64)) failures++;
      n_mud++;
    end
  end

  initial begin
    int n_g;
    tag0 = '0; data0 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n_g = 0;
    for (int b = 0; b < 200; b++) begin
      blk_kind_e kind;
      automatic int bi = b % 64, mode = $urandom_range(0, 3);
      kind = blk_kind_e'($urandom_range(0, 3));
      if (kind == K_RG || kind == K_DG) n_g++;
      for (int r = 0; r < 16; r++)
        for (int c = 0; c < 16; c++)
          img[bi][r][c] = mode == 0 ? 8'hff : mode == 1 ? 8'h00 : 8'($urandom);
      for (int p = 0; p < 32; p++) begin
        if ($urandom_range(0, 7) == 0) begin
          @(negedge clk); tag0 = '0;
        end
        @(negedge clk);
        tag0 = '0;
        tag0.valid = 1; tag0.kind = kind; tag0.i = 6'(bi); tag0.p = 5'(p);
        for (int x = 0; x < 8; x++) data0[8*x +: 8] = img[bi][p % 16][8 * (p / 16) + x];
      end
    end
    @(negedge clk) tag0 = '0;
    repeat (6) @(negedge clk);
    checks++;
    if (n_mud != n_g) failures++;
    checks++;
    if (n_pix != n_g * 16 || n_mur != 800) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
