// tb_fcic_full: end-to-end test of the encoder at its default size, the
// whole 1024x1024 RGB image (64 sub-images, about 4.7 million cycles). The
// test itself is in fcic_tb_body.svh. A watchdog ends the run.
module tb_fcic_full;
  import fcic_pkg::*;
  localparam int TB_NSUB = 64;

  logic clk = 0, rst_n, start, load_we, busy, done, s_code_valid, g_code_valid;
  logic [AW-1:0] load_addr;
  logic [DW-1:0] load_data;
  s_code_t s_code;
  g_code_t g_code;

  always #5 clk = ~clk;

  fcic_top dut (.*);

`include "fcic_tb_body.svh"

  initial begin
    repeat (8_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
