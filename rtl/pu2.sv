// pu2: matching processor PU2.
//
// Receives every fetched word into the 12x64-bit shift register R_D. Its
// partner blocks are the G range blocks in PU1's RAM 4-R (searchless scheme:
// R^r_{i,p} and R^b_{i,p} are mapped directly to R^g_{i,p}) and the
// contracted domain block D_i in its own dual-port RAM D_R (8x64 bit, search
// scheme: R^g_{j,p}, j > i, taken from the fetched D_j, is matched with D_i
// without another memory access). mu(R_D) holds the mean of the range block in
// the shift register, mu(D_R) the mean of D_i; a mux (mux1/mux2) gives OCU2
// either mu(R^g_{i,p}) or mu(D_R). SADC-Ctrl 2 times everything from the tags
// in the shift register: a range block enters SADC2 12 cycles after its first
// word was fetched and its result (SAD2/FC2) is ready 4 cycles after its last
// row. Searchless results leave as R/B codes (s_code); search results go to
// FC-SAD SCtrl (res_valid, res). Structure after the published block diagram.
module pu2
  import fcic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  fetch_tag_t           in_tag,
  input  logic [DW-1:0]        in_data,
  // storing side (SCtrl)
  input  logic                 dr_we,
  input  logic [2:0]           dr_waddr,
  input  logic [7:0]           d_be,
  input  logic [DW-1:0]        d_wdata,
  input  logic                 murd_we,
  input  logic                 mudr_we,
  input  logic [7:0]           mu_r_in,
  input  logic [7:0]           mu_d_in,
  input  logic                 rg_start,
  // PU1's RAM 4-R and mu(R) registers
  output logic                 r4_rd,
  output logic [4:0]           r4_raddr,
  input  logic [DW-1:0]        r4_rdata,
  input  logic [3:0][7:0]      mu_r_regs,
  output logic                 sl_done,
  // SAD2 / FC2
  output logic                 res_valid,
  output match_res_t           res,
  output logic                 s_code_valid,
  output s_code_t              s_code,
  output logic                 idle
);
  logic [7:0] mu_rd_q, mu_dr_q;

  always_ff @(posedge clk) begin
    if (murd_we) mu_rd_q <= mu_r_in;
    if (mudr_we) mu_dr_q <= mu_d_in;
  end

  logic [$bits(fetch_tag_t)-1:0] tap_bits, out_bits;
  logic [DW-1:0] sr_data;

  rd_shift_reg #(.DEPTH(12), .DW(DW), .TW($bits(fetch_tag_t))) u_rd (
    .clk, .rst_n, .in_data, .in_tag(in_tag), .tap_tag(tap_bits),
    .out_data(sr_data), .out_tag(out_bits)
  );

  logic [2:0]  dr_raddr;
  logic [1:0]  ocu_sel;
  logic        ocu_use_dr, use_dr;
  logic        s_valid, s_first, s_last;
  sadc_tag_t   s_tag;

  sadc_ctrl2 u_ctrl (
    .clk, .rst_n, .tap_tag(fetch_tag_t'(tap_bits)), .out_tag(fetch_tag_t'(out_bits)),
    .rg_start, .r4_rd, .r4_raddr, .dr_raddr, .ocu_sel, .ocu_use_dr, .use_dr,
    .sl_done, .sadc_valid(s_valid), .sadc_first(s_first), .sadc_last(s_last),
    .sadc_tag(s_tag)
  );

  logic [DW-1:0] dr_rdata;

  dp_ram #(.DEPTH(8), .AW(3), .DW(DW)) u_ram_dr (
    .clk, .we(dr_we), .waddr(dr_waddr), .be(d_be), .wdata(d_wdata),
    .raddr(dr_raddr), .rdata(dr_rdata)
  );

  logic [3:0][RHO_W-1:0] rho;

  ocu u_ocu2 (.clk, .mu_r(mu_rd_q), .mu_d(ocu_use_dr ? mu_dr_q : mu_r_regs[ocu_sel]), .rho);

  logic                 o_valid;
  logic [SAD_W-1:0]     o_sad;
  logic [DELTA_W-1:0]   o_delta;
  logic [RHO_W-1:0]     o_rho;
  logic [$bits(sadc_tag_t)-1:0] o_bits;
  sadc_tag_t            o_tag;

  sadc #(.TW($bits(sadc_tag_t))) u_sadc2 (
    .clk, .rst_n, .in_valid(s_valid), .in_first(s_first), .in_last(s_last),
    .r_word(sr_data), .d_word(use_dr ? dr_rdata : r4_rdata), .rho, .in_tag(s_tag),
    .out_valid(o_valid), .min_sad(o_sad), .delta(o_delta), .rho_out(o_rho),
    .out_tag(o_bits)
  );
  assign o_tag = sadc_tag_t'(o_bits);

  assign res_valid = o_valid && o_tag.kind == K_DG;
  assign res.sad   = o_sad;
  assign res.delta = o_delta;
  assign res.rho   = o_rho;
  assign res.tag   = o_tag;

  assign s_code_valid = o_valid && (o_tag.kind == K_RR || o_tag.kind == K_RB);
  assign s_code.comp  = o_tag.kind == K_RR ? 2'd1 : 2'd2;
  assign s_code.k     = o_tag.k;
  assign s_code.i     = o_tag.rng;
  assign s_code.p     = o_tag.p;
  assign s_code.delta = o_delta;
  assign s_code.rho   = o_rho;
  assign s_code.sad   = o_sad;

  // words in flight: shift register (12) + SADC2 (4) + margin
  logic [4:0] cool;
  always_ff @(posedge clk) begin
    if (!rst_n)            cool <= '0;
    else if (in_tag.valid) cool <= 5'd18;
    else if (cool != 0)    cool <= cool - 5'd1;
  end
  assign idle = cool == 5'd0;
endmodule
