// mcc: Mean-and-Contraction Computing unit.
//
// Consumes the fetched image words (8 pixels each, one word per cycle) and,
// in three pipeline stages as in the document:
//   stage 1  adds neighbouring pixel pairs (D0+D1 .. D6+D7) and accumulates
//            them over two consecutive rows into d0..d3 (SelD_rst starts a
//            new pair of rows); after the second row d0..d3 are four 2x2
//            sums, i.e. four contracted domain pixels (sum/4);
//   stage 2  adds the four pair sums of a row, and the four contracted
//            pixels of a completed row pair;
//   stage 3  accumulates the row sums of a range block (Sel_rst starts a new
//            block) and the contracted pixels of a domain block into 14-bit
//            sums; M(R) and M(D) are their top 8 bits (sum/64).
// Timing: d_pix is valid the cycle after the second row of a pair entered;
// mu_r / mu_d are valid three cycles after the last word of a block entered.
// The controls come from mcc_ctrl, aligned as described on each port. The
// truncating divisions are this design's choice.
module mcc
  import fcic_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [DW-1:0]        in_data,
  input  logic                 seld_rst,      // with in_data: first row of a pair
  input  logic                 sel_rst,       // at stage 3: first row of a range block
  input  logic                 seld_acc_rst,  // at stage 3: first row pair of a domain block
  input  logic                 dacc_en,       // at stage 3: a row pair is complete
  output logic [3:0][7:0]      d_pix,
  output logic [7:0]           mu_r,
  output logic [7:0]           mu_d
);
  // stage 1
  logic [3:0][8:0]  pair_c;
  logic [3:0][8:0]  pair1;
  logic [3:0][9:0]  dacc1;
  logic             v1;

  always_comb
    for (int n = 0; n < 4; n++)
      pair_c[n] = 9'(in_data[16*n +: 8]) + 9'(in_data[16*n+8 +: 8]);

  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in_valid;
    pair1 <= pair_c;
    if (in_valid)
      for (int n = 0; n < 4; n++)
        dacc1[n] <= (seld_rst ? 10'd0 : dacc1[n]) + 10'(pair_c[n]);
  end

  always_comb
    for (int n = 0; n < 4; n++) d_pix[n] = dacc1[n][9:2];

  // stage 2
  logic [10:0] row2;
  logic [9:0]  dsum2;
  logic        v2;

  always_ff @(posedge clk) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
    row2  <= 11'(pair1[0]) + 11'(pair1[1]) + 11'(pair1[2]) + 11'(pair1[3]);
    dsum2 <= 10'(d_pix[0]) + 10'(d_pix[1]) + 10'(d_pix[2]) + 10'(d_pix[3]);
  end

  // stage 3
  logic [13:0] acc_r, acc_d;

  always_ff @(posedge clk) begin
    if (v2) acc_r <= (sel_rst ? 14'd0 : acc_r) + 14'(row2);
    if (v2 && dacc_en) acc_d <= (seld_acc_rst ? 14'd0 : acc_d) + 14'(dsum2);
  end

  assign mu_r = acc_r[13:6];
  assign mu_d = acc_d[13:6];
endmodule
