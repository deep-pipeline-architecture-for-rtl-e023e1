// fc_sad_sctrl: FC-SAD SCtrl, the keeper of the best fractal codes.
//
// Each G range block R^g_{m,p} (address {m, p} in FC-SAD RAM) is matched with
// the 64 domain blocks of its sub-image: with D_0..D_{m-1} by PU2 and with
// D_m..D_63 by PU1, always in increasing domain order. For every result
// (SAD1/FC1 from PU1, SAD2/FC2 from PU2) this unit reads the stored word
// (cycle 1) and compares (cycle 2): the result replaces the stored SAD and
// code only if it is strictly smaller. For the first matching of a block
// (domain 0, FirstSAD) the stored SAD is replaced by all ones, so the result
// is always written. After PU1's matching with domain 63 the block's code is
// final and is also sent out on g_code. The RAM port is shared between the
// two processors (SAD_Sel); a waiting PU1 result is served first. Both
// processors deliver at most one result per 8 cycles, so a result never waits
// more than 4. Compare rule and FirstSAD follow the document; the two-cycle
// service and the output port are this design's.
module fc_sad_sctrl
  import fcic_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          res1_valid,
  input  match_res_t    res1,
  input  logic          res2_valid,
  input  match_res_t    res2,
  // FC-SAD RAM
  output logic          ram_we,
  output logic [7:0]    ram_waddr,
  output fcsad_word_t   ram_wdata,
  output logic [7:0]    ram_raddr,
  input  fcsad_word_t   ram_rdata,
  // final G codes
  output logic          g_code_valid,
  output g_code_t       g_code,
  output logic          idle
);
  // event strobes: stored code replaced / kept
  logic ev_update, ev_keep;
  match_res_t r1_q, r2_q, cur;
  logic       pend1, pend2, cur_src1;
  logic       cmp;                  // second cycle of a service

  logic serve1, serve2;
  assign serve1 = !cmp && pend1;
  assign serve2 = !cmp && !pend1 && pend2;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend1 <= 1'b0;
      pend2 <= 1'b0;
      cmp   <= 1'b0;
    end else begin
      if (res1_valid)  pend1 <= 1'b1;
      else if (serve1) pend1 <= 1'b0;
      if (res2_valid)  pend2 <= 1'b1;
      else if (serve2) pend2 <= 1'b0;
      cmp <= serve1 || serve2;
    end
    if (res1_valid) r1_q <= res1;
    if (res2_valid) r2_q <= res2;
    if (serve1 || serve2) begin
      cur      <= serve1 ? r1_q : r2_q;
      cur_src1 <= serve1;
    end
  end

  assign ram_raddr = serve1 ? {r1_q.tag.rng, r1_q.tag.p} : {r2_q.tag.rng, r2_q.tag.p};

  logic              first, better, final_m;
  logic [SAD_W-1:0]  stored_sad;
  fcsad_word_t       new_w, best_w;

  always_comb begin
    first      = cur.tag.dom == 6'd0;
    stored_sad = first ? '1 : ram_rdata.sad;
    better     = cur.sad < stored_sad;
    final_m    = cur_src1 && cur.tag.dom == 6'd63;
    new_w      = '{sad: cur.sad, j: cur.tag.dom, delta: cur.delta, rho: cur.rho};
    best_w     = (better || first) ? new_w : ram_rdata;
  end

  assign ram_we    = cmp && (better || first);
  assign ram_waddr = {cur.tag.rng, cur.tag.p};
  assign ram_wdata = new_w;
  assign ev_update = cmp && (better || first);
  assign ev_keep   = cmp && !(better || first);

  always_ff @(posedge clk) begin
    if (!rst_n) g_code_valid <= 1'b0;
    else        g_code_valid <= cmp && final_m;
    g_code <= '{k: cur.tag.k, i: cur.tag.rng, p: cur.tag.p, j: best_w.j,
                delta: best_w.delta, rho: best_w.rho, sad: best_w.sad};
  end

  assign idle = !pend1 && !pend2 && !cmp;

  // a result must be served before the same processor delivers the next one
  assert property (@(posedge clk) disable iff (!rst_n) !(res1_valid && pend1));
  assert property (@(posedge clk) disable iff (!rst_n) !(res2_valid && pend2));
endmodule
