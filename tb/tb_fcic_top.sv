// tb_fcic_top: end-to-end test of the encoder on the first two sub-images.
//
// fcic_top runs with K_LAST = 1, which covers the move from one sub-image to
// the next; the whole test is in fcic_tb_body.svh. A watchdog ends the run.
module tb_fcic_top;
  import fcic_pkg::*;
  localparam int TB_NSUB = 2;

  logic clk = 0, rst_n, start, load_we, busy, done, s_code_valid, g_code_valid;
  logic [AW-1:0] load_addr;
  logic [DW-1:0] load_data;
  s_code_t s_code;
  g_code_t g_code;

  always #5 clk = ~clk;

  fcic_top #(.K_LAST(TB_NSUB - 1)) dut (.*);

`include "fcic_tb_body.svh"

  initial begin
    repeat (2_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
