// tb_sctrl: streams random blocks with the fetch order's kinds (R^g, R^r,
// R^b, then several D^g) through MCC-Ctrl and MCC into SCtrl, and keeps
// model copies of RAM 4-R, RAM D (two banks, byte enables), RAM D_R and the
// mean-register write strobes that SCtrl produces. When SCtrl hands a G
// block to PU1 as a job the testbench checks:
//  - the job's bank holds that block's 8x8 contracted pixels in RAM D;
//  - for R^g_i: RAM 4-R holds its 32 words and RAM D_R its contraction,
//    first_of_i is set;
//  - job k/i/j match the block, banks alternate, and mu(D) of that bank is
//    written in the same cycle;
//  - mu(R_p) strobes come for the four ranges of R^g, mu(R_D) strobes for
//    the ranges of every other block.
module tb_sctrl;
  import fcic_pkg::*;
  logic clk = 0, rst_n = 0;
  fetch_tag_t tag0, tag1, tag3;
  logic [DW-1:0] data0;
  logic seld_rst, sel_rst, seld_acc_rst, dacc_en, d_valid, mu_r_valid, mu_d_valid;
  logic [3:0][7:0] d_pix;
  logic [7:0] mu_r, mu_d;
  logic r4_we, d_we, dr_we, mur_we, murd_we, mud_we, mud_bank, mudr_we, job_valid, rg_start;
  logic [4:0] r4_waddr;
  logic [3:0] d_waddr;
  logic [2:0] dr_waddr;
  logic [7:0] d_be;
  logic [1:0] mur_idx;
  logic [DW-1:0] r4_wdata, d_wdata;
  pu1_job_t job;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  mcc_ctrl u_ctl (.*);
  mcc u_mcc (.clk, .rst_n, .in_valid(tag0.valid), .in_data(data0), .seld_rst, .sel_rst, .seld_acc_rst,
             .dacc_en, .d_pix, .mu_r, .mu_d);
  sctrl dut (.*);

  logic [7:0] img[64][16][16];
  logic [DW-1:0] r4m[32], dm[16], drm[8];
  int n_mur[4], n_murd = 0, n_jobs = 0, n_rg = 0, n_rgstart = 0, last_bank = -1;

  function automatic int cpix(int b, int r, int c);
    return (int'(img[b][2*r][2*c]) + img[b][2*r][2*c+1] + img[b][2*r+1][2*c] + img[b][2*r+1][2*c+1]) / 4;
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (r4_we) r4m[r4_waddr] <= r4_wdata;
    for (int x = 0; x < 8; x++) begin
      if (d_we && d_be[x]) dm[d_waddr][8*x +: 8] <= d_wdata[8*x +: 8];
      if (dr_we && d_be[x]) drm[dr_waddr][8*x +: 8] <= d_wdata[8*x +: 8];
    end
    if (mur_we) n_mur[mur_idx]++;
    if (murd_we) n_murd++;
    if (rg_start) n_rgstart++;
    if (job_valid) begin
      automatic int b = tag3.i, bad = 0;
      n_jobs++;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < 8; c++) begin
          if (dm[{job.bank, 3'(r)}][8*c +: 8] != 8'(cpix(b, r, c))) bad++;
          if (tag3.kind == K_RG && drm[r][8*c +: 8] != 8'(cpix(b, r, c))) bad++;
        end
      if (tag3.kind == K_RG) begin
        n_rg++;
        for (int p = 0; p < 32; p++)
          for (int x = 0; x < 8; x++) if (r4m[p][8*x +: 8] != img[b][p % 16][8 * (p / 16) + x]) bad++;
      end
      checks++;
      if (bad != 0) begin failures++; $display("block %0d: %0d bad pixels", b, bad); end
      checks++;
      if (job.first_of_i != (tag3.kind == K_RG) || job.k != tag3.k || job.i != tag3.i || job.j != tag3.j ||
          !mud_we || mud_bank != job.bank || mudr_we != (tag3.kind == K_RG) || int'(job.bank) == last_bank)
        failures++;
      last_bank = job.bank;
    end
  end

  initial begin
    int bi;
    tag0 = '0; data0 = '0;
    foreach (n_mur[q]) n_mur[q] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    bi = 0;
    for (int set = 0; set < 6; set++)
      for (int s = 0; s < 3 + 4; s++) begin
        automatic blk_kind_e kind = s == 0 ? K_RG : s == 1 ? K_RR : s == 2 ? K_RB : K_DG;
        for (int r = 0; r < 16; r++)
          for (int c = 0; c < 16; c++) img[bi][r][c] = 8'($urandom);
        for (int p = 0; p < 32; p++) begin
          if (s == 3 && p == 0) repeat (8) begin @(negedge clk); tag0 = '0; end
          @(negedge clk);
          tag0 = '0;
          tag0.valid = 1; tag0.kind = kind; tag0.i = 6'(bi); tag0.p = 5'(p);
          tag0.k = 6'(set); tag0.j = 6'(s + 7 * set);
          for (int x = 0; x < 8; x++) data0[8*x +: 8] = img[bi][p % 16][8 * (p / 16) + x];
        end
        bi = (bi + 1) % 64;
      end
    @(negedge clk) tag0 = '0;
    repeat (6) @(negedge clk);
    checks++;
    if (n_jobs != 6 * 5 || n_rg != 6 || n_rgstart != 6 || n_murd != 6 * 6 * 4) failures++;
    foreach (n_mur[q]) begin
      checks++;
      if (n_mur[q] != 6) failures++;
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
