// main_ram: the image memory, 384K words of 8 bytes.
//
// Holds the G, R and B planes of a 1024x1024 image one after the other,
// each plane row by row, 8 pixels per 64-bit word (pixel x of a word in bits
// 8x+7..8x). The size and the 19-bit address follow the document. The read
// port is synchronous (data one cycle after re/raddr) and there is a separate
// write port used to load an image; both are this design's choice.
module main_ram #(
  parameter int unsigned DEPTH = 393216,
  parameter int unsigned AW    = 19,
  parameter int unsigned DW    = 64
) (
  input  logic          clk,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;
    if (re) rdata <= (raddr < AW'(DEPTH)) ? mem[raddr] : '0;
  end
endmodule
