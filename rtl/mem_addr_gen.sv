// mem_addr_gen: MemAddrG, the memory-address generator.
//
// Five counters as in the document - component c (2 bit), sub-image k, range
// set i, block j (6 bit each) and word p (5 bit) - plus a flip-flop FF.
// While en (MemAddrG_En) is high, one address per cycle walks, for every
// sub-image k and range set i:
//   R^g_i, R^r_i, R^b_i   (j = i, c = 0, 1, 2; the G block is also D_i)
//   D^g_j, j = i+1..63    (c = 0)
// Each 16x16 block is 32 words: the left 16x8 half first (p[4] = 0, rows
// p[3:0]), then the right half, so the four range blocks come out in the
// order R_{i,0}, R_{i,1}, R_{i,2}, R_{i,3}. The address is
//   addr = c & k[5:3] & j[5:3] & p[3:0] & k[2:0] & j[2:0] & p[4].
// FF is set when the R^b addresses start; while it is clear c counts, while
// it is set j counts; it clears after block 63. At the end of an i, j is
// loaded with i+1 and i increments; after i = 63, k increments. K_LAST is the
// last sub-image processed. The counters and address follow the document;
// the tag (kind, k, i, j, p of the addressed word) is this design's addition.
module mem_addr_gen
  import fcic_pkg::*;
#(
  parameter int unsigned K_LAST = 63
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           en,
  output logic [AW-1:0]  addr,
  output fetch_tag_t     tag,
  output logic           last_of_i,
  output logic           last_all
);
  logic [1:0] c_cr;
  logic [5:0] k_cr, i_cr, j_cr;
  logic [4:0] p_cr;
  logic       ff_q;

  logic blk_end;
  assign blk_end   = en && p_cr == 5'd31;
  assign last_of_i = blk_end && ff_q && j_cr == 6'd63;
  assign last_all  = last_of_i && i_cr == 6'd63 && k_cr == 6'(K_LAST);

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      c_cr <= '0; k_cr <= '0; i_cr <= '0; j_cr <= '0; p_cr <= '0; ff_q <= 1'b0;
    end else if (en) begin
      p_cr <= p_cr + 5'd1;
      if (blk_end) begin
        if (!ff_q) begin
          c_cr <= c_cr + 2'd1;
          if (c_cr == 2'd1) ff_q <= 1'b1;       // R^b starts
        end else begin
          if (c_cr == 2'd2) c_cr <= 2'd0;
          if (j_cr == 6'd63) begin               // end of this i
            ff_q <= 1'b0;
            j_cr <= i_cr + 6'd1;
            i_cr <= i_cr + 6'd1;
            if (i_cr == 6'd63) k_cr <= k_cr + 6'd1;
          end else begin
            j_cr <= j_cr + 6'd1;
          end
        end
      end
    end
  end

  always_comb begin
    addr      = block_addr(c_cr, k_cr, j_cr, p_cr);
    tag.valid = en;
    tag.kind  = (c_cr == 2'd1) ? K_RR : (c_cr == 2'd2) ? K_RB : (ff_q ? K_DG : K_RG);
    tag.k     = k_cr;
    tag.i     = i_cr;
    tag.j     = j_cr;
    tag.p     = p_cr;
  end
endmodule
