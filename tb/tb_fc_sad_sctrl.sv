// tb_fc_sad_sctrl: feeds FC-SAD SCtrl (with its FC-SAD RAM) with the result
// streams of both processors in the order the encoder produces them, for two
// sub-images: for each set i, PU1 delivers R^g_{i,p} x D_j (j = i..63) and
// PU2 delivers R^g_{j,p} x D_i (j > i), each at most one result per 8 cycles,
// both streams at once with random phase. SADs are drawn from a small range
// so that ties are frequent. A model keeps, per range block, the first
// result with the smallest SAD (strictly smaller replaces). Checks every
// final G code (block, j, delta, rho, SAD), that each block's code comes out
// exactly once, within 6 cycles of PU1's result for domain 63, and that the
// unit is idle at the end.
module tb_fc_sad_sctrl;
  import fcic_pkg::*;
  localparam int NSUB = 2;
  logic clk = 0, rst_n = 0, res1_valid = 0, res2_valid = 0;
  match_res_t res1, res2;
  logic ram_we, g_code_valid, idle;
  logic [7:0] ram_waddr, ram_raddr;
  fcsad_word_t ram_wdata, ram_rdata;
  g_code_t g_code;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  fc_sad_sctrl dut (.*);
  fc_sad_ram #(.DEPTH(256), .DW($bits(fcsad_word_t))) u_ram (.clk, .we(ram_we), .waddr(ram_waddr),
    .wdata(ram_wdata), .raddr(ram_raddr), .rdata(ram_rdata));

  int best_s [NSUB][256], best_j [NSUB][256], best_d [NSUB][256], best_r [NSUB][256];
  int got [NSUB][256];
  longint t63 [NSUB][256];
  longint cyc = 0;
  int n_codes = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic match_res_t mk(int k, int m, int p, int j, bit src1);
    match_res_t r;
    r.sad = SAD_W'($urandom_range(0, 40));
    r.delta = 2'($urandom);
    r.rho = 7'($urandom);
    r.tag.kind = src1 ? (j == m ? K_RG : K_DG) : K_DG;
    r.tag.k = 6'(k); r.tag.rng = 6'(m); r.tag.p = 2'(p); r.tag.dom = 6'(j);
    return r;
  endfunction

  // model: called in the order the results are sent for each block
  function automatic void model(match_res_t r);
    int k = r.tag.k, a = {r.tag.rng, r.tag.p};
    if (r.tag.dom == 0 || int'(r.sad) < best_s[k][a]) begin
      best_s[k][a] = r.sad; best_j[k][a] = r.tag.dom; best_d[k][a] = r.delta; best_r[k][a] = r.rho;
    end
  endfunction

  always @(posedge clk) if (rst_n && g_code_valid) begin
    automatic int k = g_code.k, a = {g_code.i, g_code.p};
    n_codes++;
    got[k][a]++;
    checks++;
    if (g_code.j != 6'(best_j[k][a]) || g_code.delta != 2'(best_d[k][a]) || g_code.rho != 7'(best_r[k][a]) ||
        g_code.sad != SAD_W'(best_s[k][a]) || cyc - t63[k][a] > 6) begin
      failures++;
      if (failures < 5) $display("k%0d blk %0d: j %0d/%0d sad %0d/%0d", k, a, g_code.j, best_j[k][a], g_code.sad,
                                 best_s[k][a]);
    end
  end

  initial begin
    foreach (got[k, a]) got[k][a] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < NSUB; k++)
      for (int i = 0; i < 64; i++) begin
        fork
          begin  // PU1: R^g_{i,p} x D_j, j = i..63
            repeat ($urandom_range(0, 7)) @(negedge clk);
            for (int j = i; j < 64; j++)
              for (int p = 0; p < 4; p++) begin
                automatic match_res_t r = mk(k, i, p, j, 1);
                res1 = r; res1_valid = 1;
                model(r);
                if (j == 63) t63[k][{i[5:0], p[1:0]}] = cyc + 1;
                @(negedge clk) res1_valid = 0;
                repeat ($urandom_range(7, 9)) @(negedge clk);
              end
          end
          begin  // PU2: R^g_{j,p} x D_i, j > i
            repeat ($urandom_range(0, 7)) @(negedge clk);
            for (int j = i + 1; j < 64; j++)
              for (int p = 0; p < 4; p++) begin
                automatic match_res_t r = mk(k, j, p, i, 0);
                res2 = r; res2_valid = 1;
                model(r);
                @(negedge clk) res2_valid = 0;
                repeat ($urandom_range(7, 9)) @(negedge clk);
              end
          end
        join
        repeat (6) @(negedge clk);
      end
    repeat (10) @(negedge clk);
    checks++;
    if (n_codes != NSUB * 256 || !idle) failures++;
    foreach (got[k, a]) begin
      checks++;
      if (got[k][a] != 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
