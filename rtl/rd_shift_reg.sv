// rd_shift_reg: shift register R_D of processor PU2, 12 words of 64 bits.
//
// Every fetched word enters at the head and leaves DEPTH cycles later, so a
// range block is presented to SADC2 exactly when its mean and its offsets
// have been computed (8 words + 3 MCC stages + mu(R_D) register + OCU2 = 12
// cycles). A tag travels with each word; tap_tag is the tag one stage before
// the output, which lets the controller start the partner read and OCU2 one
// cycle ahead. Depth and width follow the document; the tag is this design's.
module rd_shift_reg #(
  parameter int unsigned DEPTH = 12,
  parameter int unsigned DW    = 64,
  parameter int unsigned TW    = 27
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [DW-1:0] in_data,
  input  logic [TW-1:0] in_tag,
  output logic [TW-1:0] tap_tag,
  output logic [DW-1:0] out_data,
  output logic [TW-1:0] out_tag
);
  logic [DW-1:0] data_q [DEPTH];
  logic [TW-1:0] tag_q  [DEPTH];

  always_ff @(posedge clk) begin
    data_q[0] <= in_data;
    for (int s = 1; s < DEPTH; s++) data_q[s] <= data_q[s-1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int s = 0; s < DEPTH; s++) tag_q[s] <= '0;
    end else begin
      tag_q[0] <= in_tag;
      for (int s = 1; s < DEPTH; s++) tag_q[s] <= tag_q[s-1];
    end
  end

  assign tap_tag  = tag_q[DEPTH-2];
  assign out_data = data_q[DEPTH-1];
  assign out_tag  = tag_q[DEPTH-1];
endmodule
