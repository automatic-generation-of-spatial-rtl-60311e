// tb_rtvps_top_full: the design at its default size (1367x768 frames of
// 24-bit pixels, 3x3 window, 7-frame temporal neighbourhood, 36-bit ZBT
// SRAM, bursts of 8) run end to end through eight full frames, one pixel
// every eight cycles: from the seventh frame on all seven temporal levels
// hold real frames, and the eighth is written over the first in the frame
// store. The checks are in rtvps_top_check.svh.
module tb_rtvps_top_full;
  import rtvps_pkg::*;
  localparam int W = IMG_W_DEF, H = IMG_H_DEF, OM = OMEGA_DEF, NF = NFRAMES_DEF;
  localparam int PW = PIX_W_DEF, MW = MEM_W_DEF;
  localparam int NFRAMES_IN = NF + 1, PERIOD = NF + 1;

  `include "rtvps_top_check.svh"

  rtvps_top dut (.*);

  initial begin
    repeat (100000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
