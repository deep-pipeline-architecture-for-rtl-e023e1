// tb_fcic_512: the encoder on 16 sub-images, the amount of work of a
// 512x512 RGB image (16 tiles of 128x128 per component), with K_LAST = 15.
// The tiles are the first two tile rows of the 1024x1024 frame; since every
// sub-image is encoded on its own, their place in the frame does not change
// the work or the time. The run also reports the time after four sub-images,
// the work of a 256x256 RGB image. Checks and mechanism counts are those of
// fcic_tb_body.svh; a watchdog ends the run.
module tb_fcic_512;
  import fcic_pkg::*;
  localparam int TB_NSUB = 16;

  logic clk = 0, rst_n, start, load_we, busy, done, s_code_valid, g_code_valid;
  logic [AW-1:0] load_addr;
  logic [DW-1:0] load_data;
  s_code_t s_code;
  g_code_t g_code;

  always #5 clk = ~clk;

  fcic_top #(.K_LAST(TB_NSUB - 1)) dut (.*);

`include "fcic_tb_body.svh"

  initial begin
    repeat (4_000_000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
