// sadc_ctrl2: SADC-Ctrl 2, the sequencer of processor PU2.
//
// Every fetched word runs through the 12-word shift register R_D. PU2 works
// on R and B range blocks (searchless scheme) and on G domain blocks D_j,
// j > i, whose four quarters are the range blocks R^g_{j,0..3} (search
// scheme). When such a word is one stage before the end of the shift
// register (tap_tag), this unit reads its partner row one cycle ahead:
//   searchless: row p[2:0] of R^g_{i,p[4:3]} = RAM 4-R word p (r4_rd claims
//               RAM 4-R's read port);
//   search:     row p[2:0] of the contracted D_i in RAM D_R;
// and sets the mux1/mux2 selects of OCU2's mu(D) input: mu(R^g_{i,p[4:3]})
// (ocu_sel, ocu_use_dr = 0) or mu(D_R) (ocu_use_dr = 1). On the next cycle
// the word leaves the shift register, the partner row arrives, OCU2's offsets
// are ready and the row enters SADC2 (sadc_valid/first/last, sadc_tag; the
// range index is i for R/B and j for G, the domain index is i).
// sl_done rises after the last searchless read of a set and falls when
// RAM 4-R starts to be refilled (rg_start). The timing follows the document
// (mean after 3 stages + 1 register, offsets 1 cycle later); the tag-driven
// logic is this design's.
module sadc_ctrl2
  import fcic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fetch_tag_t  tap_tag,
  input  fetch_tag_t  out_tag,
  input  logic        rg_start,
  output logic        r4_rd,
  output logic [4:0]  r4_raddr,
  output logic [2:0]  dr_raddr,
  output logic [1:0]  ocu_sel,
  output logic        ocu_use_dr,
  output logic        use_dr,
  output logic        sl_done,
  output logic        sadc_valid,
  output logic        sadc_first,
  output logic        sadc_last,
  output sadc_tag_t   sadc_tag
);
  logic tap_sl, tap_dg;
  assign tap_sl = tap_tag.valid && (tap_tag.kind == K_RR || tap_tag.kind == K_RB);
  assign tap_dg = tap_tag.valid && tap_tag.kind == K_DG;

  assign r4_rd      = tap_sl;
  assign r4_raddr   = tap_tag.p;
  assign dr_raddr   = tap_tag.p[2:0];
  assign ocu_sel    = tap_tag.p[4:3];
  assign ocu_use_dr = tap_tag.kind == K_DG;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      use_dr  <= 1'b0;
      sl_done <= 1'b0;
    end else begin
      use_dr <= tap_dg;
      if (rg_start) sl_done <= 1'b0;
      else if (tap_sl && tap_tag.kind == K_RB && tap_tag.p == 5'd31) sl_done <= 1'b1;
    end
  end

  always_comb begin
    sadc_valid    = out_tag.valid && out_tag.kind != K_RG;
    sadc_first    = out_tag.p[2:0] == 3'd0;
    sadc_last     = out_tag.p[2:0] == 3'd7;
    sadc_tag.kind = out_tag.kind;
    sadc_tag.k    = out_tag.k;
    sadc_tag.rng  = out_tag.kind == K_DG ? out_tag.j : out_tag.i;
    sadc_tag.p    = out_tag.p[4:3];
    sadc_tag.dom  = out_tag.i;
  end
endmodule
