// Harness shared by the processor testbenches tb_pu1 and tb_pu2 (included
// inside the testbench module, which sets CHK1/CHK2 to choose the outputs
// it checks).
//
// Builds one 128x128 RGB sub-image (G: texture plus ramps, R and B derived
// from G plus noise) and plays the encoder's fetch order for it directly
// into the storing path (MCC-Ctrl, MCC, SCtrl) and the two processors: for
// each i, R^g_i, R^r_i, R^b_i, 8 idle cycles, D^g_{i+1..63}, then a wait
// until both processors are idle. Every PU1 result (R^g_{i,p} x D_j), PU2
// search result (R^g_{j,p} x D_i) and PU2 searchless code (R^r/b_{i,p} x
// R^g_{i,p}) is compared with a model of the matching arithmetic: best scale
// code (ties: lowest), offset code round(rho/4) from the quarter-unit means,
// prediction clamped to 0..255, SAD of the 64 pixels.

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] sub [3][128][128];   // plane (G, R, B), row, column

  // front end
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

  mcc_ctrl u_mcc_ctrl (.*);
  mcc u_mcc (.clk, .rst_n, .in_valid(tag0.valid), .in_data(data0), .seld_rst, .sel_rst, .seld_acc_rst,
             .dacc_en, .d_pix, .mu_r, .mu_d);
  sctrl u_sctrl (.*);

  // processors
  logic r4_rd, sl_done, res1_valid, res2_valid, s_code_valid, idle1, idle2;
  logic [4:0] r4_raddr;
  logic [DW-1:0] r4_rdata;
  logic [3:0][7:0] mu_r_regs;
  match_res_t res1, res2;
  s_code_t s_code;

  pu1 u_pu1 (.clk, .rst_n, .r4_we, .r4_waddr, .r4_wdata, .d_we, .d_waddr, .d_be, .d_wdata, .mur_we, .mur_idx,
             .mud_we, .mud_bank, .mu_r_in(mu_r), .mu_d_in(mu_d), .job_valid, .job, .sl_done,
             .r4_ext_rd(r4_rd), .r4_ext_raddr(r4_raddr), .r4_rdata, .mu_r_regs,
             .res_valid(res1_valid), .res(res1), .idle(idle1));
  pu2 u_pu2 (.clk, .rst_n, .in_tag(tag0), .in_data(data0), .dr_we, .dr_waddr, .d_be, .d_wdata, .murd_we,
             .mudr_we, .mu_r_in(mu_r), .mu_d_in(mu_d), .rg_start, .r4_rd, .r4_raddr, .r4_rdata, .mu_r_regs,
             .sl_done, .res_valid(res2_valid), .res(res2), .s_code_valid, .s_code, .idle(idle2));

  // ---------------- model ----------------
  function automatic void range_blk(int c, int m, int p, output int v[64]);
    for (int n = 0; n < 64; n++) v[n] = sub[c][(m / 8) * 16 + (p % 2) * 8 + n / 8][(m % 8) * 16 + (p / 2) * 8 + n % 8];
  endfunction

  function automatic void dom_blk(int j, output int v[64]);
    for (int n = 0; n < 64; n++) begin
      int y = (j / 8) * 16 + 2 * (n / 8), x = (j % 8) * 16 + 2 * (n % 8);
      v[n] = (int'(sub[0][y][x]) + sub[0][y][x+1] + sub[0][y+1][x] + sub[0][y+1][x+1]) / 4;
    end
  endfunction

  // best (sad, delta, rho) of range rr against block dd
  function automatic void match(int rr[64], int dd[64], output int bs, output int bd, output int bq);
    int mr = 0, md = 0;
    foreach (rr[n]) begin mr += rr[n]; md += dd[n]; end
    mr /= 64; md /= 64;
    bs = 1 << 30;
    for (int d = 0; d < 4; d++) begin
      int q, s = 0, sc;
      sc = (d == 0) ? -2 * md : (d == 1) ? md : (d == 2) ? 2 * md : 4 * md;
      q = (4 * mr - sc + 8) >>> 4;
      if (q > 63) q = 63;
      if (q < -64) q = -64;
      for (int n = 0; n < 64; n++) begin
        int pred = ((d == 0) ? -2 * dd[n] : (d == 1) ? dd[n] : (d == 2) ? 2 * dd[n] : 4 * dd[n]) + 16 * q;
        if (pred < 0) pred = 0;
        if (pred > 1020) pred = 1020;
        s += (4 * rr[n] > pred) ? 4 * rr[n] - pred : pred - 4 * rr[n];
      end
      s /= 4;
      if (s < bs) begin bs = s; bd = d; bq = q; end
    end
  endfunction

  function automatic bit same(int s, int d, int q, logic [SAD_W-1:0] gs, logic [1:0] gd, logic [6:0] gq);
    return gs == SAD_W'(s) && gd == 2'(d) && gq == 7'(q);
  endfunction

  int n_res1 = 0, n_res2 = 0, n_scode = 0;
  int got1 [64][64][4];   // range set, domain, p
  int got2 [64][64][4];
  int gots [3][64][4];

  always @(posedge clk) if (rst_n) begin
    int rr[64], dd[64], s, d, q;
    if (res1_valid) begin
      n_res1++;
      range_blk(0, res1.tag.rng, res1.tag.p, rr);
      dom_blk(res1.tag.dom, dd);
      match(rr, dd, s, d, q);
      got1[res1.tag.rng][res1.tag.dom][res1.tag.p]++;
      if (CHK1) begin
        checks++;
        if (!same(s, d, q, res1.sad, res1.delta, res1.rho) || res1.tag.dom < res1.tag.rng) begin
          failures++;
          if (failures < 5) $display("PU1 R%0d.%0d x D%0d: sad %0d exp %0d", res1.tag.rng, res1.tag.p,
                                     res1.tag.dom, res1.sad, s);
        end
      end
    end
    if (res2_valid) begin
      n_res2++;
      range_blk(0, res2.tag.rng, res2.tag.p, rr);
      dom_blk(res2.tag.dom, dd);
      match(rr, dd, s, d, q);
      got2[res2.tag.rng][res2.tag.dom][res2.tag.p]++;
      if (CHK2) begin
        checks++;
        if (!same(s, d, q, res2.sad, res2.delta, res2.rho) || res2.tag.dom >= res2.tag.rng) begin
          failures++;
          if (failures < 5) $display("PU2 R%0d.%0d x D%0d: sad %0d exp %0d", res2.tag.rng, res2.tag.p,
                                     res2.tag.dom, res2.sad, s);
        end
      end
    end
    if (s_code_valid) begin
      n_scode++;
      range_blk(s_code.comp, s_code.i, s_code.p, rr);
      range_blk(0, s_code.i, s_code.p, dd);
      match(rr, dd, s, d, q);
      gots[s_code.comp][s_code.i][s_code.p]++;
      if (CHK2) begin
        checks++;
        if (!same(s, d, q, s_code.sad, s_code.delta, s_code.rho) || s_code.comp == 0) begin
          failures++;
          if (failures < 5) $display("S%0d R%0d.%0d: sad %0d exp %0d", s_code.comp, s_code.i, s_code.p,
                                     s_code.sad, s);
        end
      end
    end
  end

  task automatic send_block(blk_kind_e kind, int c, int i, int j);
    int m = (kind == K_DG) ? j : i;
    for (int p = 0; p < 32; p++) begin
      @(negedge clk);
      tag0 = '0;
      tag0.valid = 1; tag0.kind = kind; tag0.i = 6'(i); tag0.j = 6'(j); tag0.p = 5'(p);
      for (int x = 0; x < 8; x++) data0[8*x +: 8] = sub[c][(m / 8) * 16 + p % 16][(m % 8) * 16 + 8 * (p / 16) + x];
    end
  endtask

  task automatic run_all();
    for (int y = 0; y < 128; y++)
      for (int x = 0; x < 128; x++) begin
        int g = (y / 16 % 2 == 0) ? (x * 2 + y) % 256 : $urandom_range(0, 255);
        if (x / 16 == 3) g = (x % 16) * (x % 16) + y % 16;
        sub[0][y][x] = 8'(g);
        sub[1][y][x] = 8'((3 * g) / 4 + 30 + $urandom_range(0, 6));
        sub[2][y][x] = 8'(240 - (3 * g) / 4 - $urandom_range(0, 6));
      end
    foreach (got1[a, b, c]) begin got1[a][b][c] = 0; got2[a][b][c] = 0; end
    foreach (gots[a, b, c]) gots[a][b][c] = 0;
    tag0 = '0; data0 = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      send_block(K_RG, 0, i, i);
      send_block(K_RR, 1, i, i);
      send_block(K_RB, 2, i, i);
      @(negedge clk) tag0 = '0;
      repeat (7) @(negedge clk);
      for (int j = i + 1; j < 64; j++) send_block(K_DG, 0, i, j);
      @(negedge clk) tag0 = '0;
      repeat (8) @(negedge clk);
      while (!(idle1 && idle2)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
  endtask

  // each result exactly once
  task automatic count_all();
    int bad1 = 0, bad2 = 0, bads = 0;
    foreach (got1[m, j, p]) begin
      if (got1[m][j][p] != (j >= m ? 1 : 0)) bad1++;
      if (got2[m][j][p] != (j < m ? 1 : 0)) bad2++;
    end
    foreach (gots[c, m, p]) if (gots[c][m][p] != (c == 0 ? 0 : 1)) bads++;
    if (CHK1) begin
      checks++;
      if (bad1 != 0 || n_res1 != 8320) begin failures++; $display("PU1: %0d results, %0d missing/extra", n_res1, bad1); end
    end
    if (CHK2) begin
      checks++;
      if (bad2 != 0 || n_res2 != 8064) begin failures++; $display("PU2: %0d results, %0d missing/extra", n_res2, bad2); end
      checks++;
      if (bads != 0 || n_scode != 512) begin failures++; $display("PU2: %0d codes, %0d missing/extra", n_scode, bads); end
    end
  endtask
