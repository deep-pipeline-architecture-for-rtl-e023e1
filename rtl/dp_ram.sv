// dp_ram: simple dual-port RAM with byte write enables.
//
// Used for the processors' internal buffers: RAM 4-R (32 words, the four G
// range blocks of the current set), RAM D (16 words, two contracted domain
// blocks) and RAM D_R (8 words, the contracted domain block D_i). One write
// port with a byte-enable mask and one read port with one cycle of latency
// (rdata shows raddr of the previous cycle). Sizes follow the document; the
// byte enables and the latency are this design's choice.
module dp_ram #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned AW    = 5,
  parameter int unsigned DW    = 64
) (
  input  logic            clk,
  input  logic            we,
  input  logic [AW-1:0]   waddr,
  input  logic [DW/8-1:0] be,
  input  logic [DW-1:0]   wdata,
  input  logic [AW-1:0]   raddr,
  output logic [DW-1:0]   rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) begin
      for (int b = 0; b < DW/8; b++)
        if (be[b]) mem[waddr][8*b +: 8] <= wdata[8*b +: 8];
    end
    rdata <= mem[raddr];
  end
endmodule
