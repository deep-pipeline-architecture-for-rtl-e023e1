// Body shared by the end-to-end testbenches of fcic_top (included inside a
// module that declares clk, rst_n, the DUT ports and TB_NSUB).
//
// Builds a correlated RGB test image (G: gradients plus texture, R: a scaled
// G plus noise, B: an inverted G plus noise), loads it, runs the encoder and
// compares every emitted code with a reference model written from the
// algorithm: for each G range block the best (SAD, then lowest domain index,
// then lowest scale code) of the 64 contracted domain blocks of its
// sub-image and the four scale codes; for each R/B range block the best scale
// code when mapped onto the G range block at the same place. It also checks
// the fetch timing (104 cycles from R^g_i to D_{i+1}, 32 cycles per domain
// block) and counts how often each mechanism of the design fired.

  logic [7:0] img [3][1024*1024];

  function automatic logic [7:0] pix(input int c, input int y, input int x);
    return img[c][y*1024 + x];
  endfunction

  function automatic int rho_code(input int mr, input int md, input int d);
    int sc, r, q;
    sc = (d == 0) ? -2*md : (d == 1) ? md : (d == 2) ? 2*md : 4*md;
    r  = 4*mr - sc;                    // quarter units
    q  = (r + 8) >>> 4;
    if (q > 63) q = 63;
    if (q < -64) q = -64;
    return q;
  endfunction

  // SAD between a range block rr and a block dd (both 64 pixels) for scale d
  function automatic int sad_of(input int rr[64], input int dd[64], input int d, input int q);
    int s, pred;
    s = 0;
    for (int n = 0; n < 64; n++) begin
      pred = ((d == 0) ? -2*dd[n] : (d == 1) ? dd[n] : (d == 2) ? 2*dd[n] : 4*dd[n]) + 16*q;
      if (pred < 0) pred = 0;
      if (pred > 1020) pred = 1020;
      s += (4*rr[n] > pred) ? 4*rr[n] - pred : pred - 4*rr[n];
    end
    return s / 4;
  endfunction

  function automatic int sx7(input logic [6:0] v);
    return int'(signed'(v));
  endfunction

  // expected codes
  int exp_g_j [TB_NSUB][256], exp_g_d [TB_NSUB][256], exp_g_r [TB_NSUB][256], exp_g_s [TB_NSUB][256];
  int exp_s_d [TB_NSUB][2][256], exp_s_r [TB_NSUB][2][256], exp_s_s [TB_NSUB][2][256];
  int got_g [TB_NSUB][256];
  int got_s [TB_NSUB][2][256];
  int delta_hist [4];

  // 8x8 range block p of set m in sub-image k of plane c
  function automatic void get_range(input int c, input int k, input int m, input int p, output int rr[64]);
    int y0, x0;
    y0 = (k / 8) * 128 + (m / 8) * 16 + (p % 2) * 8;
    x0 = (k % 8) * 128 + (m % 8) * 16 + (p / 2) * 8;
    for (int n = 0; n < 64; n++) rr[n] = int'(pix(c, y0 + n / 8, x0 + n % 8));
  endfunction

  function automatic void get_dom(input int k, input int j, output int dd[64]);
    int y0, x0;
    y0 = (k / 8) * 128 + (j / 8) * 16;
    x0 = (k % 8) * 128 + (j % 8) * 16;
    for (int n = 0; n < 64; n++) begin
      int yy, xx;
      yy = y0 + 2 * (n / 8);
      xx = x0 + 2 * (n % 8);
      dd[n] = (int'(pix(0, yy, xx)) + int'(pix(0, yy, xx + 1)) +
               int'(pix(0, yy + 1, xx)) + int'(pix(0, yy + 1, xx + 1))) / 4;
    end
  endfunction

  function automatic int mean64(input int v[64]);
    int s;
    s = 0;
    foreach (v[n]) s += v[n];
    return s / 64;
  endfunction

  task automatic reference();
    int rr[64], gg[64], dd[64][64], md[64];
    for (int k = 0; k < TB_NSUB; k++) begin
      for (int j = 0; j < 64; j++) begin
        int t[64];
        get_dom(k, j, t);
        dd[j] = t;
        md[j] = mean64(t);
      end
      for (int m = 0; m < 64; m++)
        for (int p = 0; p < 4; p++) begin
          int best, bj, bd, bq, mr, a;
          get_range(0, k, m, p, gg);
          mr = mean64(gg);
          best = 1 << 30;
          for (int j = 0; j < 64; j++)
            for (int d = 0; d < 4; d++) begin
              int q, s;
              q = rho_code(mr, md[j], d);
              s = sad_of(gg, dd[j], d, q);
              if (s < best) begin best = s; bj = j; bd = d; bq = q; end
            end
          a = m * 4 + p;
          exp_g_j[k][a] = bj; exp_g_d[k][a] = bd; exp_g_r[k][a] = bq; exp_g_s[k][a] = best;
          for (int c = 1; c <= 2; c++) begin
            int mg;
            get_range(c, k, m, p, rr);
            mg = mean64(gg);
            best = 1 << 30;
            for (int d = 0; d < 4; d++) begin
              int q, s;
              q = rho_code(mean64(rr), mg, d);
              s = sad_of(rr, gg, d, q);
              if (s < best) begin best = s; bd = d; bq = q; end
            end
            exp_s_d[k][c-1][a] = bd; exp_s_r[k][c-1][a] = bq; exp_s_s[k][c-1][a] = best;
          end
        end
    end
  endtask

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------- mechanism counters ----------------
  int n_searchless = 0, n_pu1 = 0, n_pu2 = 0, n_first = 0, n_update = 0, n_keep = 0;
  int n_gap = 0, n_drain = 0, n_rg_wait = 0, n_subimg = 0, n_final = 0;
  int n_neg_delta = 0, n_rho_sat = 0;
  longint t_rg [64];
  longint t_sub4 = 0;
  int timing_bad = 0, timing_checked = 0;
  longint t_prev_dg;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_pu2.s_code_valid) n_searchless++;
    if (dut.res1_valid) n_pu1++;
    if (dut.res2_valid) n_pu2++;
    if (dut.u_fcs.cmp && dut.u_fcs.first) n_first++;
    if (dut.u_fcs.ev_update) n_update++;
    if (dut.u_fcs.ev_keep) n_keep++;
    if (dut.u_memctrl.state == dut.u_memctrl.S_GAP) n_gap++;
    if (dut.u_memctrl.state == dut.u_memctrl.S_DRAIN) n_drain++;
    if (!dut.u_pu1.u_ctrl.busy && dut.u_pu1.u_ctrl.q_cnt != 0 && dut.u_pu1.u_ctrl.q[0].first_of_i
        && !dut.sl_done) n_rg_wait++;
    if (dut.g_code_valid) n_final++;
    // fetch timing, from the address side
    if (dut.tag_a.valid && dut.tag_a.p == 0) begin
      if (dut.tag_a.kind == K_RG) begin
        t_rg[dut.tag_a.i] = cyc;
        if (dut.tag_a.i == 0) begin
          n_subimg++;
          if (n_subimg == 5) t_sub4 = cyc;
        end
      end
      if (dut.tag_a.kind == K_DG) begin
        timing_checked++;
        if (dut.tag_a.j == dut.tag_a.i + 1) begin
          if (cyc - t_rg[dut.tag_a.i] != 104) timing_bad++;
        end else if (cyc - t_prev_dg != 32) timing_bad++;
        t_prev_dg = cyc;
      end
    end
  end

  always @(posedge clk) if (rst_n && s_code_valid) begin
    int a, c;
    a = s_code.i * 4 + s_code.p;
    c = s_code.comp - 1;
    if (s_code.k < TB_NSUB && (c == 0 || c == 1)) begin
      got_s[s_code.k][c][a]++;
      checks++;
      if (s_code.delta != exp_s_d[s_code.k][c][a] || sx7(s_code.rho) != exp_s_r[s_code.k][c][a]
          || s_code.sad != exp_s_s[s_code.k][c][a]) begin
        failures++;
        if (failures < 10)
          $display("S mismatch k=%0d c=%0d i=%0d p=%0d got d=%0d r=%0d s=%0d exp d=%0d r=%0d s=%0d",
                   s_code.k, c, s_code.i, s_code.p, s_code.delta, sx7(s_code.rho), s_code.sad,
                   exp_s_d[s_code.k][c][a], exp_s_r[s_code.k][c][a], exp_s_s[s_code.k][c][a]);
      end
    end else failures++;
  end

  always @(posedge clk) if (rst_n && g_code_valid) begin
    int a;
    a = g_code.i * 4 + g_code.p;
    if (g_code.k < TB_NSUB) begin
      got_g[g_code.k][a]++;
      delta_hist[g_code.delta]++;
      if (sx7(g_code.rho) == 63 || sx7(g_code.rho) == -64) n_rho_sat++;
      if (g_code.delta == 0) n_neg_delta++;
      checks++;
      if (g_code.j != exp_g_j[g_code.k][a] || g_code.delta != exp_g_d[g_code.k][a] ||
          sx7(g_code.rho) != exp_g_r[g_code.k][a] || g_code.sad != exp_g_s[g_code.k][a]) begin
        failures++;
        if (failures < 10)
          $display("G mismatch k=%0d i=%0d p=%0d got j=%0d d=%0d r=%0d s=%0d exp j=%0d d=%0d r=%0d s=%0d",
                   g_code.k, g_code.i, g_code.p, g_code.j, g_code.delta, sx7(g_code.rho), g_code.sad,
                   exp_g_j[g_code.k][a], exp_g_d[g_code.k][a], exp_g_r[g_code.k][a], exp_g_s[g_code.k][a]);
      end
    end else failures++;
  end

  task automatic count(input string what, input longint n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never seen: %s", what);
    end else $display("  %-34s %0d", what, n);
  endtask

  initial begin
    longint t_start, t_done;
    rst_n = 0; start = 0; load_we = 0; load_addr = '0; load_data = '0;
    // test image
    for (int y = 0; y < 1024; y++)
      for (int x = 0; x < 1024; x++) begin
        int g, r, b, tex;
        tex = ((x * 7 + y * 13) % 29) + ((x / 8 + y / 8) % 2) * 40 + ((x ^ y) & 15);
        g = (x / 5 + y / 9 + tex + int'($urandom_range(0, 7))) % 256;
        if (((x / 16) + (y / 16)) % 7 == 3) g = 255 - g / 2;   // some high, bright blocks
        // sub-image 1 (and every 8th one after it): a noise-free quadratic ramp,
        // where a range block matches a domain block of half its slope with
        // delta = 1 and a linear stretch matches with delta = 0.5
        if ((x / 128) % 8 == 1 && (y / 128) % 2 == 0) g = ((x % 128) * (x % 128)) / 66 + (y % 128) / 16;
        r = g * 3 / 4 + 30 + int'($urandom_range(0, 5));
        b = 240 - g * 3 / 4 + int'($urandom_range(0, 5));
        if (r > 255) r = 255;
        if (b < 0) b = 0;
        img[0][y*1024+x] = 8'(g);
        img[1][y*1024+x] = 8'(r);
        img[2][y*1024+x] = 8'(b);
      end
    reference();
    repeat (3) @(posedge clk);
    rst_n = 1;
    // load the planes, 8 pixels per word
    for (int c = 0; c < 3; c++)
      for (int w = 0; w < 131072; w++) begin
        logic [63:0] wd;
        for (int x = 0; x < 8; x++) wd[8*x +: 8] = img[c][w*8 + x];
        @(negedge clk);
        load_we = 1; load_addr = 19'(c * 131072 + w); load_data = wd;
      end
    @(negedge clk) load_we = 0;
    @(negedge clk) start = 1;
    t_start = cyc;
    @(negedge clk) start = 0;
    wait (done);
    t_done = cyc;
    repeat (5) @(posedge clk);
    // every code delivered exactly once
    for (int k = 0; k < TB_NSUB; k++)
      for (int a = 0; a < 256; a++) begin
        checks++;
        if (got_g[k][a] != 1 || got_s[k][0][a] != 1 || got_s[k][1][a] != 1) failures++;
      end
    // fetch timing and total encoding time
    checks++;
    if (timing_bad != 0 || timing_checked == 0) begin
      failures++;
      $display("fetch timing wrong in %0d of %0d domain fetches", timing_bad, timing_checked);
    end
    checks++;
    // per sub-image: 64 x (96 + 8) searchless cycles, 2016 x 32 search cycles, plus drains
    if (t_done - t_start > longint'(TB_NSUB) * (64 * (104 + 60) + 2016 * 32)) failures++;
    $display("encoding cycles: %0d for %0d sub-image(s) (%0d per sub-image), %0.3f ms at 380 MHz",
             t_done - t_start, TB_NSUB, (t_done - t_start) / TB_NSUB, real'(t_done - t_start) / 380.0e3);
    if (t_sub4 > 0)
      $display("first 4 sub-images (a 256x256 RGB image): %0d cycles, %0.3f ms at 380 MHz",
               t_sub4 - t_start, real'(t_sub4 - t_start) / 380.0e3);
    $display("mechanisms:");
    count("searchless R/B matchings", n_searchless);
    count("PU1 matchings (j >= i)", n_pu1);
    count("PU2 matchings (R_j vs D_i)", n_pu2);
    count("FirstSAD writes", n_first);
    count("FC-SAD replaced (smaller SAD)", n_update);
    count("FC-SAD kept (not smaller)", n_keep);
    count("8-cycle gap cycles", n_gap);
    count("drain cycles before next i", n_drain);
    count("PU1 waits for PU2 to free RAM 4-R", n_rg_wait);
    count("sub-images started", n_subimg);
    count("final G codes", n_final);
    count("G codes with delta=-0.5", n_neg_delta);
    for (int d = 1; d < 4; d++) count($sformatf("G codes with delta code %0d", d), delta_hist[d]);
    checks++;
    // per sub-image PU1 does sum_i 4(64-i) = 8320 matchings, PU2 4*2016 = 8064
    if (n_pu1 != TB_NSUB * 8320 || n_pu2 != TB_NSUB * 8064) failures++;
    $display("rho codes at the clamp limits: %0d", n_rho_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
