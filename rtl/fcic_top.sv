// fcic_top: fractal colour image encoder for 1024x1024 RGB images.
//
// G, the colour plane that correlates best with the other two, is encoded
// with a local search: every 8x8 range block of a 128x128 sub-image is
// compared with the 64 contracted 16x16 domain blocks of that sub-image, for
// four scale codes, and the best (SAD) domain index j, scale delta and
// offset rho are kept. R and B are encoded without search: each of their
// range blocks is mapped onto the G range block at the same place, so only
// delta and rho are stored.
//
// Data path: MemCtrl/MemAddrG fetch R^g_i, R^r_i, R^b_i, then D^g_{i+1..63}
// from main_ram; MCC (with MCC-Ctrl) computes means and contracted pixels;
// SCtrl stores them into PU1 and PU2; PU1 matches R^g_{i,p} with D_j, j >= i;
// PU2 matches R^r/R^b with R^g (searchless) and, from the same fetched
// D_j, R^g_{j,p} with D_i, so each domain block is read from memory once for
// two matchings; FC-SAD SCtrl keeps the best code of each range block.
//
// Interface: load the image through load_* (word address as in mem_addr_gen:
// G plane at 0, R at 2^17, B at 2^18, each row-wise, 128 words per row),
// pulse start, and collect s_code (one per R/B range block, in fetch order)
// and g_code (one per G range block, when its last comparison is done) until
// done pulses. K_LAST+1 sub-images are encoded (all 64 by default).
module fcic_top
  import fcic_pkg::*;
#(
  parameter int unsigned K_LAST = 63
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          load_we,
  input  logic [AW-1:0] load_addr,
  input  logic [DW-1:0] load_data,
  output logic          busy,
  output logic          done,
  output logic          s_code_valid,
  output s_code_t       s_code,
  output logic          g_code_valid,
  output g_code_t       g_code
);
  // ---------------- memory side ----------------
  logic          addrg_en, addrg_clr, last_of_i, last_all, pu_idle, pu1_started;
  logic [AW-1:0] addr;
  fetch_tag_t    tag_a, tag0;
  logic [DW-1:0] data0;
  logic          pg_valid, sg_valid;

  mem_addr_gen #(.K_LAST(K_LAST)) u_addrg (
    .clk, .rst_n, .clr(addrg_clr), .en(addrg_en), .addr, .tag(tag_a), .last_of_i, .last_all
  );

  mem_ctrl u_memctrl (
    .clk, .rst_n, .start, .tag_in(tag_a), .last_of_i, .last_all, .pu_idle, .pu1_started,
    .addrg_en, .addrg_clr, .tag_out(tag0), .pg_valid, .sg_valid, .busy, .done
  );

  main_ram u_ram (
    .clk, .re(addrg_en), .raddr(addr), .rdata(data0),
    .we(load_we), .waddr(load_addr), .wdata(load_data)
  );

  // ---------------- MCC ----------------
  logic            seld_rst, sel_rst, seld_acc_rst, dacc_en, d_valid, mu_r_valid, mu_d_valid;
  fetch_tag_t      tag1, tag3;
  logic [3:0][7:0] d_pix;
  logic [7:0]      mu_r, mu_d;

  mcc_ctrl u_mccctrl (
    .clk, .rst_n, .tag0, .seld_rst, .sel_rst, .seld_acc_rst, .dacc_en,
    .d_valid, .tag1, .mu_r_valid, .mu_d_valid, .tag3
  );

  mcc u_mcc (
    .clk, .rst_n, .in_valid(pg_valid || sg_valid), .in_data(data0), .seld_rst, .sel_rst,
    .seld_acc_rst, .dacc_en, .d_pix, .mu_r, .mu_d
  );

  // ---------------- SCtrl ----------------
  logic          r4_we, d_we, dr_we, mur_we, murd_we, mud_we, mud_bank, mudr_we, job_valid, rg_start;
  logic [4:0]    r4_waddr;
  logic [DW-1:0] r4_wdata, d_wdata;
  logic [3:0]    d_waddr;
  logic [2:0]    dr_waddr;
  logic [7:0]    d_be;
  logic [1:0]    mur_idx;
  pu1_job_t      job;

  sctrl u_sctrl (
    .clk, .rst_n, .tag0, .data0, .d_valid, .tag1, .d_pix, .mu_r_valid, .mu_d_valid, .tag3,
    .r4_we, .r4_waddr, .r4_wdata, .d_we, .d_waddr, .dr_we, .dr_waddr, .d_be, .d_wdata,
    .mur_we, .mur_idx, .murd_we, .mud_we, .mud_bank, .mudr_we, .job_valid, .job, .rg_start
  );

  // ---------------- processors ----------------
  logic            sl_done, r4_ext_rd, res1_valid, res2_valid, pu1_idle, pu2_idle, fcs_idle;
  logic [4:0]      r4_ext_raddr;
  logic [DW-1:0]   r4_rdata;
  logic [3:0][7:0] mu_r_regs;
  match_res_t      res1, res2;

  pu1 u_pu1 (
    .clk, .rst_n, .r4_we, .r4_waddr, .r4_wdata, .d_we, .d_waddr, .d_be, .d_wdata,
    .mur_we, .mur_idx, .mud_we, .mud_bank, .mu_r_in(mu_r), .mu_d_in(mu_d),
    .job_valid, .job, .sl_done, .r4_ext_rd, .r4_ext_raddr, .r4_rdata, .mu_r_regs,
    .res_valid(res1_valid), .res(res1), .idle(pu1_idle), .jobs_started(pu1_started)
  );

  pu2 u_pu2 (
    .clk, .rst_n, .in_tag(tag0), .in_data(data0), .dr_we, .dr_waddr, .d_be, .d_wdata,
    .murd_we, .mudr_we, .mu_r_in(mu_r), .mu_d_in(mu_d), .rg_start,
    .r4_rd(r4_ext_rd), .r4_raddr(r4_ext_raddr), .r4_rdata, .mu_r_regs, .sl_done,
    .res_valid(res2_valid), .res(res2), .s_code_valid, .s_code, .idle(pu2_idle)
  );

  // ---------------- FC-SAD ----------------
  logic        fram_we;
  logic [7:0]  fram_waddr, fram_raddr;
  fcsad_word_t fram_wdata, fram_rdata;

  fc_sad_sctrl u_fcs (
    .clk, .rst_n, .res1_valid, .res1, .res2_valid, .res2,
    .ram_we(fram_we), .ram_waddr(fram_waddr), .ram_wdata(fram_wdata),
    .ram_raddr(fram_raddr), .ram_rdata(fram_rdata),
    .g_code_valid, .g_code, .idle(fcs_idle)
  );

  logic [FCSAD_W-1:0] fram_q;

  fc_sad_ram #(.DEPTH(256), .DW(FCSAD_W)) u_fcram (
    .clk, .we(fram_we), .waddr(fram_waddr), .wdata(fram_wdata), .raddr(fram_raddr), .rdata(fram_q)
  );
  assign fram_rdata = fcsad_word_t'(fram_q);

  assign pu_idle = pu1_idle && pu2_idle && fcs_idle;
endmodule
