// tb_pu2: checks processor PU2 (12-word shift register R_D, RAM D_R, mean
// registers, OCU2, SADC2, SADC-Ctrl 2) over one full sub-image with the
// storing path in front of it and PU1 beside it (PU1 holds RAM 4-R and the
// mu(R^g) registers that the searchless scheme reads). Checks every SAD2/FC2
// search result (R^g_{j,p} against D_i, j > i; 8064 in all) and every
// searchless code (R^r/R^b_{i,p} against R^g_{i,p}; 512 in all) with a model
// (see pu_harness.svh), each exactly once. Rate: the words stream through
// PU2 at one per cycle with no stall, so each 32-word block must produce
// its four results without holding up the fetch.
module tb_pu2;
  import fcic_pkg::*;
  localparam bit CHK1 = 0, CHK2 = 1;
`include "pu_harness.svh"
  initial begin
    run_all();
    count_all();
    checks++;
    if (!idle2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
