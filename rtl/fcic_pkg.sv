// fcic_pkg: types and constants shared by the fractal colour image encoder.
//
// The encoder works on a 1024x1024 RGB image kept as 64-bit words (8 pixels)
// in the main RAM. Each colour plane is split into 64 sub-images of 128x128;
// a sub-image holds 64 domain blocks of 16x16 (index j) and 256 range blocks
// of 8x8, grouped four per domain-block position (index i, quadrant p).
// A fetched word travels with a fetch_tag_t that says which block and row it
// belongs to; the block kinds, code layouts and delta table below are used by
// every unit. The delta values follow the document; the 7-bit rho code
// (rho = 4*code) and the field order of the codes are this design's choice.
package fcic_pkg;

  localparam int unsigned AW        = 19;   // main RAM word address
  localparam int unsigned DW        = 64;   // main RAM word: 8 pixels
  localparam int unsigned PIX       = 8;    // pixels per word
  localparam int unsigned SAD_W     = 14;   // SAD of 64 pixels: <= 64*255
  localparam int unsigned RHO_W     = 7;    // offset code
  localparam int unsigned DELTA_W   = 2;    // scale code
  localparam int unsigned FCSAD_W   = SAD_W + 6 + DELTA_W + RHO_W;  // 29

  // Kind of block a fetched word belongs to.
  typedef enum logic [1:0] {
    K_RG = 2'd0,   // G range set R^g_i (also the domain block D_i)
    K_RR = 2'd1,   // R range set R^r_i
    K_RB = 2'd2,   // B range set R^b_i
    K_DG = 2'd3    // G domain block D_j, j > i
  } blk_kind_e;

  typedef struct packed {
    logic       valid;
    blk_kind_e  kind;
    logic [5:0] k;    // sub-image
    logic [5:0] i;    // current 4-range set
    logic [5:0] j;    // block whose pixels these are
    logic [4:0] p;    // word in the 16x16 block: p[4] right half, p[3:0] row
  } fetch_tag_t;

  // A PU1 job: one contracted domain block in RAM D, matched with R_{i,0..3}.
  typedef struct packed {
    logic       bank;
    logic       first_of_i;   // D_{j=i}: must wait until PU2 frees RAM 4-R
    logic [5:0] k;
    logic [5:0] i;
    logic [5:0] j;
  } pu1_job_t;

  // Tag carried through an SADC with each matching.
  typedef struct packed {
    blk_kind_e  kind;     // K_RR/K_RB: searchless; K_RG/K_DG: search
    logic [5:0] k;
    logic [5:0] rng;      // range set index of the range block
    logic [1:0] p;        // range block in the set
    logic [5:0] dom;      // domain block index
  } sadc_tag_t;

  // One matching result (SAD1/FC1 or SAD2/FC2).
  typedef struct packed {
    logic [SAD_W-1:0]   sad;
    logic [DELTA_W-1:0] delta;
    logic [RHO_W-1:0]   rho;
    sadc_tag_t          tag;
  } match_res_t;

  // Word of the FC-SAD RAM.
  typedef struct packed {
    logic [SAD_W-1:0]   sad;
    logic [5:0]         j;
    logic [DELTA_W-1:0] delta;
    logic [RHO_W-1:0]   rho;
  } fcsad_word_t;

  // Final code of a G range block (search scheme).
  typedef struct packed {
    logic [5:0]         k;
    logic [5:0]         i;
    logic [1:0]         p;
    logic [5:0]         j;
    logic [DELTA_W-1:0] delta;
    logic [RHO_W-1:0]   rho;
    logic [SAD_W-1:0]   sad;
  } g_code_t;

  // Code of an R or B range block (searchless scheme).
  typedef struct packed {
    logic [1:0]         comp;   // 1 = R, 2 = B
    logic [5:0]         k;
    logic [5:0]         i;
    logic [1:0]         p;
    logic [DELTA_W-1:0] delta;
    logic [RHO_W-1:0]   rho;
    logic [SAD_W-1:0]   sad;
  } s_code_t;

  // delta * x in quarter units for the four delta codes
  // (-0.5, 0.25, 0.5, 1) -> (-2x, x, 2x, 4x).
  function automatic logic signed [11:0] delta_q4(input logic [1:0] dc, input logic [7:0] x);
    logic signed [11:0] xs;
    xs = 12'(x);
    case (dc)
      2'd0:    return -(xs <<< 1);
      2'd1:    return xs;
      2'd2:    return xs <<< 1;
      default: return xs <<< 2;
    endcase
  endfunction

  // Word address of word p of block j, sub-image k, colour c (the published MemAddrG layout).
  function automatic logic [AW-1:0] block_addr(input logic [1:0] c, input logic [5:0] k,
                                               input logic [5:0] j, input logic [4:0] p);
    return {c, k[5:3], j[5:3], p[3:0], k[2:0], j[2:0], p[4]};
  endfunction

endpackage
