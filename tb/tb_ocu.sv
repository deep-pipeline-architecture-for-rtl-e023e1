// tb_ocu: checks the Offset-Computation-Unit against the offset formula
// rho = mu_r - delta*mu_d (delta = -0.5, 0.25, 0.5, 1), quantised to
// round(rho/4) clamped to -64..63, for corner and random means, including
// the one-cycle latency.
module tb_ocu;
  import fcic_pkg::*;
  logic clk = 0;
  logic [7:0] mu_r, mu_d;
  logic [3:0][RHO_W-1:0] rho;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  ocu dut (.clk, .mu_r, .mu_d, .rho);

  function automatic int expect_code(int mr, int md, int d);
    real r, dl[4];
    int q;
    dl = '{-0.5, 0.25, 0.5, 1.0};
    r = real'(mr) - dl[d] * real'(md);
    q = $floor(r / 4.0 + 0.5);
    if (q > 63) q = 63;
    if (q < -64) q = -64;
    return q;
  endfunction

  task automatic one(int mr, int md);
    @(negedge clk);
    mu_r = 8'(mr); mu_d = 8'(md);
    @(negedge clk);   // one cycle later
    for (int d = 0; d < 4; d++) begin
      int got;
      got = int'($signed(rho[d]));
      checks++;
      if (got != expect_code(mr, md, d)) begin
        failures++;
        $display("mr=%0d md=%0d d=%0d got %0d exp %0d", mr, md, d, got, expect_code(mr, md, d));
      end
    end
  endtask

  initial begin
    one(0, 0); one(255, 255); one(0, 255); one(255, 0); one(128, 64); one(6, 0); one(2, 0);
    repeat (300) one(int'($urandom_range(0, 255)), int'($urandom_range(0, 255)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
