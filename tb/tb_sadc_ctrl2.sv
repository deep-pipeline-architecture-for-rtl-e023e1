// tb_sadc_ctrl2: SADC-Ctrl 2 with PU2's 12-word shift register R_D in front
// of it (which supplies the tap and output tags). The testbench streams the
// fetch order of several sets (R^g_i, R^r_i, R^b_i, gap, D^g_j) and checks,
// for every word leaving R_D:
//  - one cycle before, the partner row was read: RAM 4-R word p with r4_rd
//    for R/B words (searchless), RAM D_R row p mod 8 for D^g words (search),
//    and OCU2's mu(D) select was mu(R^g_{p/8}) or mu(D_R);
//  - R/B/D^g words enter SADC2 (valid, first/last at rows 0/7, tag: kind,
//    range = i for R/B and j for D^g, domain = i, p = quarter); R^g words
//    do not; use_dr marks D^g words;
//  - sl_done rises after the last R^b word passed the tap and falls when
//    rg_start (refill of RAM 4-R) comes.
// Latency: a word enters SADC2 12 cycles after it is fetched.
module tb_sadc_ctrl2;
  import fcic_pkg::*;
  logic clk = 0, rst_n = 0, rg_start = 0;
  fetch_tag_t in_tag, tap_tag, out_tag;
  logic r4_rd, ocu_use_dr, use_dr, sl_done, sadc_valid, sadc_first, sadc_last;
  logic [4:0] r4_raddr;
  logic [2:0] dr_raddr;
  logic [1:0] ocu_sel;
  sadc_tag_t sadc_tag;
  logic [DW-1:0] out_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  rd_shift_reg #(.DEPTH(12), .DW(DW), .TW($bits(fetch_tag_t))) u_rd (.clk, .rst_n, .in_data('0), .in_tag(in_tag),
    .tap_tag, .out_data, .out_tag);
  sadc_ctrl2 dut (.*);

  fetch_tag_t hist[$];   // tags as fetched, one per cycle
  logic p_r4_rd, p_use;
  logic [4:0] p_r4a;
  logic [2:0] p_dra;
  logic [1:0] p_sel;
  int n_sadc = 0, n_rise = 0;
  longint cyc = 0, t_rb_last = 0;
  logic sl_q = 0;

  // sl_done is seen high 12 cycles after the last R^b word was fetched
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    sl_q <= sl_done;
    if (in_tag.valid && in_tag.kind == K_RB && in_tag.p == 31) t_rb_last <= cyc;
    if (sl_done && !sl_q) begin
      n_rise++;
      checks++;
      if (cyc - t_rb_last != 12) begin failures++; $display("sl_done after %0d cycles", cyc - t_rb_last); end
    end
  end

  always @(posedge clk) if (rst_n) begin
    fetch_tag_t t;
    hist.push_back(in_tag);
    p_r4_rd <= r4_rd; p_r4a <= r4_raddr; p_dra <= dr_raddr; p_sel <= ocu_sel; p_use <= ocu_use_dr;
    if (hist.size() > 12) begin
      t = hist.pop_front();   // fetched 12 cycles ago: leaving R_D now
      checks++;
      if (t.valid && t.kind != K_RG) begin
        n_sadc++;
        if (!sadc_valid || sadc_first != (t.p[2:0] == 0) || sadc_last != (t.p[2:0] == 7) ||
            sadc_tag.kind != t.kind || sadc_tag.k != t.k || sadc_tag.p != t.p[4:3] || sadc_tag.dom != t.i ||
            sadc_tag.rng != (t.kind == K_DG ? t.j : t.i) || use_dr != (t.kind == K_DG) ||
            p_sel != t.p[4:3] || p_use != (t.kind == K_DG) ||
            (t.kind == K_DG ? p_dra != t.p[2:0] : (!p_r4_rd || p_r4a != t.p))) begin
          failures++;
          if (failures < 5) $display("word kind %0d p %0d: wrong", t.kind, t.p);
        end
      end else if (sadc_valid || p_r4_rd) failures++;
    end
  end

  task automatic send(blk_kind_e kind, int i, int j);
    for (int p = 0; p < 32; p++) begin
      @(negedge clk);
      in_tag = '0;
      in_tag.valid = 1; in_tag.kind = kind; in_tag.k = 6'(i / 3); in_tag.i = 6'(i); in_tag.j = 6'(j);
      in_tag.p = 5'(p);
      rg_start = kind == K_RG && p == 0;
    end
  endtask

  initial begin
    in_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 8; i++) begin
      send(K_RG, i, i);
      @(negedge clk); #1;
      checks++;
      if (sl_done) failures++;          // cleared by the refill
      send(K_RR, i, i);
      send(K_RB, i, i);
      @(negedge clk) begin in_tag = '0; rg_start = 0; end
      repeat (7) @(negedge clk);
      for (int j = i + 1; j < i + 1 + $urandom_range(0, 5); j++) send(K_DG, i, j);
      @(negedge clk) in_tag = '0;
      repeat ($urandom_range(14, 30)) @(negedge clk);
      checks++;
      if (!sl_done || n_rise != i + 1) failures++;   // once per set
    end
    checks++;
    if (n_sadc == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
