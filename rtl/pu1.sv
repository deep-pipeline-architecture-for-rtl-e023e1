// pu1: matching processor PU1.
//
// Holds the four G range blocks of the current set, R^g_{i,0..3}, in
// dual-port RAM 4-R (32x64 bit) with their means in mu(R1)..mu(R4), and the
// contracted domain blocks in dual-port RAM D (16x64 bit, two banks) with one
// mu(D) register per bank. SADC-Ctrl 1 takes one domain block at a time and,
// over 32 cycles, matches it with R_{i,0}..R_{i,3}; OCU1 turns mu(R_p) and
// mu(D) into the four offsets, SADC1 returns, every 8 cycles, the smallest
// SAD of the four scale codes. That result is the SAD1/FC1 register pair
// (res_valid, res). PU1 thus covers the matchings R_{i,p} x D_j, j >= i.
// RAM 4-R's read port is shared: while r4_ext_rd is high PU2 drives the
// address (searchless scheme) and reads r4_rdata. idle is high when no job is
// queued, running or still in SADC1; jobs_started when none is waiting, i.e.
// the last domain block has begun its 32 reads and RAM 4-R may be refilled
// behind them. Structure after the published block diagram of
// the architecture; the second mu(D) register is this design's.
module pu1
  import fcic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // storing side (SCtrl)
  input  logic                 r4_we,
  input  logic [4:0]           r4_waddr,
  input  logic [DW-1:0]        r4_wdata,
  input  logic                 d_we,
  input  logic [3:0]           d_waddr,
  input  logic [7:0]           d_be,
  input  logic [DW-1:0]        d_wdata,
  input  logic                 mur_we,
  input  logic [1:0]           mur_idx,
  input  logic                 mud_we,
  input  logic                 mud_bank,
  input  logic [7:0]           mu_r_in,
  input  logic [7:0]           mu_d_in,
  input  logic                 job_valid,
  input  pu1_job_t             job,
  input  logic                 sl_done,
  // RAM 4-R and mu(R) access for PU2
  input  logic                 r4_ext_rd,
  input  logic [4:0]           r4_ext_raddr,
  output logic [DW-1:0]        r4_rdata,
  output logic [3:0][7:0]      mu_r_regs,
  // SAD1 / FC1
  output logic                 res_valid,
  output match_res_t           res,
  output logic                 idle,
  output logic                 jobs_started  // no job waiting: RAM 4-R may be refilled
);
  logic [3:0][7:0] mu_r_q;
  logic [1:0][7:0] mu_d_q;

  always_ff @(posedge clk) begin
    if (mur_we) mu_r_q[mur_idx]  <= mu_r_in;
    if (mud_we) mu_d_q[mud_bank] <= mu_d_in;
  end
  assign mu_r_regs = mu_r_q;

  logic        busy, ctrl_idle;
  logic [4:0]  c_r4_raddr;
  logic [3:0]  c_d_raddr;
  logic [1:0]  mur_sel;
  logic        mud_sel;
  logic        s_valid, s_first, s_last;
  sadc_tag_t   s_tag;

  sadc_ctrl1 u_ctrl (
    .clk, .rst_n, .job_valid, .job, .sl_done,
    .busy, .idle(ctrl_idle), .q_empty(jobs_started), .r4_raddr(c_r4_raddr), .d_raddr(c_d_raddr),
    .mur_sel, .mud_sel, .sadc_valid(s_valid), .sadc_first(s_first),
    .sadc_last(s_last), .sadc_tag(s_tag)
  );

  logic [DW-1:0] d_rdata;

  dp_ram #(.DEPTH(32), .AW(5), .DW(DW)) u_ram_4r (
    .clk, .we(r4_we), .waddr(r4_waddr), .be(8'hFF), .wdata(r4_wdata),
    .raddr(r4_ext_rd ? r4_ext_raddr : c_r4_raddr), .rdata(r4_rdata)
  );

  dp_ram #(.DEPTH(16), .AW(4), .DW(DW)) u_ram_d (
    .clk, .we(d_we), .waddr(d_waddr), .be(d_be), .wdata(d_wdata),
    .raddr(c_d_raddr), .rdata(d_rdata)
  );

  logic [3:0][RHO_W-1:0] rho;

  ocu u_ocu1 (.clk, .mu_r(mu_r_q[mur_sel]), .mu_d(mu_d_q[mud_sel]), .rho);

  logic [$bits(sadc_tag_t)-1:0] o_tag;

  sadc #(.TW($bits(sadc_tag_t))) u_sadc1 (
    .clk, .rst_n, .in_valid(s_valid), .in_first(s_first), .in_last(s_last),
    .r_word(r4_rdata), .d_word(d_rdata), .rho, .in_tag(s_tag),
    .out_valid(res_valid), .min_sad(res.sad), .delta(res.delta), .rho_out(res.rho),
    .out_tag(o_tag)
  );
  assign res.tag = sadc_tag_t'(o_tag);

  // SADC1 pipeline occupancy: a job's last row leaves SADC1 6 cycles after
  // the sequencer stops
  logic [2:0] cool;
  always_ff @(posedge clk) begin
    if (!rst_n)      cool <= '0;
    else if (busy)   cool <= 3'd7;
    else if (cool != 0) cool <= cool - 3'd1;
  end
  assign idle = ctrl_idle && cool == 3'd0;

  // PU2 may only claim RAM 4-R while PU1 is not reading it
  assert property (@(posedge clk) disable iff (!rst_n) !(r4_ext_rd && busy));
endmodule
