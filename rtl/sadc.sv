// sadc: SAD-Computation unit (SADC1 in PU1, SADC2 in PU2).
//
// Matches one 8x8 range block with one 8x8 block D (a contracted domain
// block, or the G range block in the searchless scheme) for all four scale
// codes at once. Each cycle brings one row: 8 range pixels r_word and 8
// pixels d_word. Four pipeline stages, as in the document:
//   PS1  prediction delta*d + rho per pixel and scale, clamped to 0..255,
//        and its absolute difference from r (all in quarter units, so
//        delta = 0.25 is exact);
//   PS2  sum of the 8 differences of a row, per scale;
//   PS3  accumulation over the 8 rows (reset on the first row);
//   PS4  SAD = sum/4 per scale and selection of the smallest (MinSAD); a tie
//        goes to the lower scale code.
// rho (four 7-bit codes, rho = 4*code) is taken on the first row and held for
// the block. in_tag is taken on the first row and returned with the result.
// Timing: out_valid is high for one cycle, 4 cycles after the row flagged
// in_last entered; a new block may start on the cycle after in_last, so one
// matching takes 8 cycles. The SAD is the plain sum over 64 pixels (no 1/N),
// 14 bits. Clamping and tie rule are this design's choice.
module sadc
  import fcic_pkg::*;
#(
  parameter int unsigned TW = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic                   in_first,
  input  logic                   in_last,
  input  logic [DW-1:0]          r_word,
  input  logic [DW-1:0]          d_word,
  input  logic [3:0][RHO_W-1:0]  rho,
  input  logic [TW-1:0]          in_tag,
  output logic                   out_valid,
  output logic [SAD_W-1:0]       min_sad,
  output logic [DELTA_W-1:0]     delta,
  output logic [RHO_W-1:0]       rho_out,
  output logic [TW-1:0]          out_tag
);
  // rho and tag held for the block being entered
  logic [3:0][RHO_W-1:0] rho_hold;
  logic [TW-1:0]         tag_hold;
  logic [3:0][RHO_W-1:0] rho_now;
  logic [TW-1:0]         tag_now;

  assign rho_now = in_first ? rho : rho_hold;
  assign tag_now = in_first ? in_tag : tag_hold;

  always_ff @(posedge clk)
    if (in_valid && in_first) begin
      rho_hold <= rho;
      tag_hold <= in_tag;
    end

  // ---------------- PS1: absolute differences ----------------
  logic [3:0][7:0][9:0] ad_c, ad1;
  logic                 v1, f1, l1;
  logic [3:0][RHO_W-1:0] rho1;
  logic [TW-1:0]        tag1;

  always_comb begin
    for (int d = 0; d < 4; d++) begin
      for (int x = 0; x < PIX; x++) begin
        logic signed [13:0] pred, rq, diff;
        pred = 14'(delta_q4(2'(d), d_word[8*x +: 8])) + 14'(signed'(rho_now[d]) * 16);
        if (pred < 0)              pred = '0;
        else if (pred > 14'sd1020) pred = 14'sd1020;
        rq   = 14'(signed'({4'b0000, r_word[8*x +: 8], 2'b00}));
        diff = rq - pred;
        ad_c[d][x] = (diff < 0) ? 10'(-diff) : 10'(diff);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    ad1  <= ad_c;
    f1   <= in_first;
    l1   <= in_last;
    rho1 <= rho_now;
    tag1 <= tag_now;
  end

  // ---------------- PS2: row sums ----------------
  logic [3:0][12:0] rs2;
  logic             v2, f2, l2;
  logic [3:0][RHO_W-1:0] rho2;
  logic [TW-1:0]    tag2;

  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    for (int d = 0; d < 4; d++) begin
      logic [12:0] s;
      s = '0;
      for (int x = 0; x < PIX; x++) s = s + 13'(ad1[d][x]);
      rs2[d] <= s;
    end
    f2 <= f1; l2 <= l1; rho2 <= rho1; tag2 <= tag1;
  end

  // ---------------- PS3: accumulation over the block ----------------
  logic [3:0][15:0] acc3;
  logic             done3;
  logic [3:0][RHO_W-1:0] rho3;
  logic [TW-1:0]    tag3;

  always_ff @(posedge clk) begin
    if (!rst_n) done3 <= 1'b0;
    else        done3 <= v2 && l2;
    if (v2) begin
      for (int d = 0; d < 4; d++) acc3[d] <= (f2 ? 16'd0 : acc3[d]) + 16'(rs2[d]);
      rho3 <= rho2;
      tag3 <= tag2;
    end
  end

  // ---------------- PS4: MinSAD ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= done3;
    if (done3) begin
      logic [SAD_W-1:0] best;
      logic [1:0]       bi;
      best = acc3[0][15:2];
      bi   = 2'd0;
      for (int d = 1; d < 4; d++)
        if (acc3[d][15:2] < best) begin
          best = acc3[d][15:2];
          bi   = 2'(d);
        end
      min_sad <= best;
      delta   <= bi;
      rho_out <= rho3[bi];
      out_tag <= tag3;
    end
  end
endmodule
