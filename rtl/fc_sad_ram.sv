// fc_sad_ram: FC-SAD RAM, 256 words of 29 bits.
//
// One word per range block of the current sub-image (address {i, p}) holding
// the smallest SAD found so far and its fractal code, packed as
// fcsad_word_t = {SAD 14, j 6, delta 2, rho 7}. The size follows the
// document; the field order is this design's choice. Synchronous read with
// one cycle of latency (Q), one write port.
module fc_sad_ram #(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned DW    = 29
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
