// tb_sadc: checks the SAD-Computation unit. Random 8x8 range and domain
// blocks with random offset codes are fed back to back, one row per cycle;
// each result (MinSAD, scale code, offset code, tag) is compared with a
// direct evaluation of sum |r - clamp(delta*d + rho, 0, 255)| for the four
// scale codes, and the result must appear 4 cycles after the last row.
module tb_sadc;
  import fcic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [DW-1:0] r_word, d_word;
  logic [3:0][RHO_W-1:0] rho;
  logic [31:0] in_tag;
  logic out_valid;
  logic [SAD_W-1:0] min_sad;
  logic [DELTA_W-1:0] delta;
  logic [RHO_W-1:0] rho_out;
  logic [31:0] out_tag;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sadc #(.TW(32)) dut (.*);

  localparam int NB = 200;
  int rr[NB][64], dd[NB][64], qq[NB][4];
  int exp_s[NB], exp_d[NB], exp_q[NB];
  longint cyc = 0, t_last[NB];
  always @(posedge clk) cyc <= cyc + 1;

  function automatic int sad_ref(int b, int d);
    real dl[4], s, pred;
    dl = '{-0.5, 0.25, 0.5, 1.0};
    s = 0;
    for (int n = 0; n < 64; n++) begin
      pred = dl[d] * real'(dd[b][n]) + 4.0 * real'(qq[b][d]);
      if (pred < 0) pred = 0;
      if (pred > 255) pred = 255;
      s += (real'(rr[b][n]) > pred) ? real'(rr[b][n]) - pred : pred - real'(rr[b][n]);
    end
    return int'($floor(s));
  endfunction

  int nout = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (nout >= NB || min_sad != exp_s[nout] || delta != exp_d[nout] ||
        int'($signed(rho_out)) != exp_q[nout] || out_tag != 32'(nout) || cyc - t_last[nout] != 4) begin
      failures++;
      if (failures < 5 && nout < NB)
        $display("blk %0d got s=%0d d=%0d q=%0d lat=%0d exp s=%0d d=%0d q=%0d", nout, min_sad, delta,
                 $signed(rho_out), cyc - t_last[nout], exp_s[nout], exp_d[nout], exp_q[nout]);
    end
    nout++;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin
      int base, best;
      base = int'($urandom_range(0, 255));
      for (int n = 0; n < 64; n++) begin
        dd[b][n] = int'($urandom_range(0, 255));
        rr[b][n] = (b % 3 == 0) ? int'($urandom_range(0, 255)) : (dd[b][n] / 2 + base / 2 + int'($urandom_range(0, 9))) % 256;
      end
      for (int d = 0; d < 4; d++) qq[b][d] = int'($urandom_range(0, 127)) - 64;
      best = 1 << 30;
      for (int d = 0; d < 4; d++) begin
        int s;
        s = sad_ref(b, d);
        if (s < best) begin best = s; exp_d[b] = d; exp_q[b] = qq[b][d]; end
      end
      exp_s[b] = best;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) begin
      if (b % 5 == 4) begin @(negedge clk); in_valid = 0; end   // an idle gap now and then
      for (int w = 0; w < 8; w++) begin
        @(negedge clk);
        in_valid = 1; in_first = (w == 0); in_last = (w == 7);
        for (int x = 0; x < 8; x++) begin
          r_word[8*x +: 8] = 8'(rr[b][w*8+x]);
          d_word[8*x +: 8] = 8'(dd[b][w*8+x]);
        end
        // offsets only meaningful on the first row
        for (int d = 0; d < 4; d++) rho[d] = (w == 0) ? 7'(qq[b][d]) : 7'($urandom);
        in_tag = (w == 0) ? 32'(b) : $urandom;
        if (w == 7) t_last[b] = cyc;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (nout != NB) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
