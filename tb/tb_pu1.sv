// tb_pu1: checks processor PU1 (RAM 4-R, RAM D, mean registers, OCU1,
// SADC1, SADC-Ctrl 1) over one full sub-image with the storing path in
// front of it and PU2 beside it (PU2 provides sl_done and shares RAM 4-R).
// Every SAD1/FC1 result, R^g_{i,p} against D_j for j = i..63, is compared
// with a model (see pu_harness.svh); all 8320 results must appear once.
// Rate: PU1 must keep up with one domain block per 32 cycles; the harness
// sends D blocks back to back, so a slower PU1 would lose blocks (RAM D has
// two banks) and the result checks would fail.
module tb_pu1;
  import fcic_pkg::*;
  localparam bit CHK1 = 1, CHK2 = 0;
`include "pu_harness.svh"
  initial begin
    run_all();
    count_all();
    checks++;
    if (!idle1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
