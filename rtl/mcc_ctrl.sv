// mcc_ctrl: MCC-Ctrl, the controller of the MCC unit.
//
// Follows the tag of each fetched word through MCC's three stages and, from
// the word's position p in its 16x16 block (p[4] right half, p[3:0] row),
// produces MCC's controls and the valid strobes of its results:
//   seld_rst      (with the word)  even row: start a new 2x2 row pair;
//   sel_rst       (at stage 3)     row 0 of an 8x8 range block;
//   seld_acc_rst  (at stage 3)     first row pair of a G block;
//   dacc_en       (at stage 3)     a row pair of a G block is complete;
//   d_valid, tag1 (after stage 1)  contracted pixels d0..d3 are ready;
//   mu_r_valid, mu_d_valid, tag3   (after stage 3) M(R) of the range block
//                 tag3.p[4:3] (mu(R)_No), M(D) of a G block.
// Contraction and domain means are produced only for G blocks. The document
// names this unit and its strobes; the logic is this design's.
module mcc_ctrl
  import fcic_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  fetch_tag_t  tag0,
  output logic        seld_rst,
  output logic        sel_rst,
  output logic        seld_acc_rst,
  output logic        dacc_en,
  output logic        d_valid,
  output fetch_tag_t  tag1,
  output logic        mu_r_valid,
  output logic        mu_d_valid,
  output fetch_tag_t  tag3
);
  fetch_tag_t tag2;

  function automatic logic is_g(input fetch_tag_t t);
    return t.kind == K_RG || t.kind == K_DG;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tag1 <= '0; tag2 <= '0; tag3 <= '0;
    end else begin
      tag1 <= tag0; tag2 <= tag1; tag3 <= tag2;
    end
  end

  assign seld_rst     = ~tag0.p[0];
  assign sel_rst      = tag2.p[2:0] == 3'd0;
  assign seld_acc_rst = tag2.p == 5'd1;
  assign dacc_en      = tag2.valid && tag2.p[0] && is_g(tag2);
  assign d_valid      = tag1.valid && tag1.p[0] && is_g(tag1);
  assign mu_r_valid   = tag3.valid && tag3.p[2:0] == 3'd7;
  assign mu_d_valid   = tag3.valid && tag3.p == 5'd31 && is_g(tag3);
endmodule
