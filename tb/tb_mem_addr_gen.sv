// tb_mem_addr_gen: runs the address generator over two sub-images with
// MemAddrG_En dropping at random, and compares every address and tag with
// a model of the fetch order: for each i, R^g_i, R^r_i, R^b_i, then
// D^g_{i+1..63}, 32 words each (left 16x8 half first), and the address
// computed from the pixel position (plane*2^17 + row*128 + column/8).
// Checks last_of_i and last_all and the number of addresses.
module tb_mem_addr_gen;
  import fcic_pkg::*;
  localparam int NSUB = 2;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [AW-1:0] addr;
  fetch_tag_t tag;
  logic last_of_i, last_all;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mem_addr_gen #(.K_LAST(NSUB - 1)) dut (.*);

  initial begin
    int k, i, bseq, c, j, p, n_addr;
    repeat (2) @(negedge clk);
    rst_n = 1;
    n_addr = 0;
    for (k = 0; k < NSUB; k++)
      for (i = 0; i < 64; i++)
        for (bseq = 0; bseq < 3 + 63 - i; bseq++) begin
          c = (bseq < 3) ? bseq : 0;
          j = (bseq < 3) ? i : i + bseq - 2;
          for (p = 0; p < 32; p++) begin
            int row, colw;
            logic [AW-1:0] ea;
            blk_kind_e ek;
            // a random stall
            while ($urandom_range(0, 9) == 0) begin
              @(negedge clk); en = 0;
            end
            @(negedge clk); en = 1;
            #1;
            row  = (k / 8) * 128 + (j / 8) * 16 + (p % 16);
            colw = (k % 8) * 16 + (j % 8) * 2 + p / 16;
            ea   = AW'(c * 131072 + row * 128 + colw);
            ek   = (c == 1) ? K_RR : (c == 2) ? K_RB : (bseq == 0 ? K_RG : K_DG);
            checks++;
            if (addr != ea || tag.kind != ek || tag.k != 6'(k) || tag.i != 6'(i) || tag.j != 6'(j) ||
                tag.p != 5'(p) || !tag.valid) begin
              failures++;
              if (failures < 5) $display("k%0d i%0d c%0d j%0d p%0d: addr %h exp %h kind %0d/%0d", k, i, c, j, p,
                                         addr, ea, tag.kind, ek);
            end
            checks++;
            if (last_of_i != (p == 31 && bseq == 3 + 63 - i - 1) ||
                last_all != (p == 31 && bseq == 3 + 63 - i - 1 && i == 63 && k == NSUB - 1)) failures++;
            n_addr++;
          end
        end
    @(negedge clk); en = 0;
    checks++;
    if (n_addr != NSUB * (64 * 96 + 2016 * 32)) failures++;
    // clr restarts at the beginning
    @(negedge clk); clr = 1;
    @(negedge clk); clr = 0; en = 1; #1;
    checks++;
    if (addr != 0 || tag.kind != K_RG) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
