// tb_rtvps_top: end-to-end test of the spatio-temporal memory architecture
// at a reduced size (8x6 frames of 8-bit pixels, 3x3 window, 3-frame
// temporal neighbourhood, bursts of 4) with the ZBT SRAM model: five frames,
// so that every temporal level holds real frames and the frame store wraps
// around. The checks are in rtvps_top_check.svh.
module tb_rtvps_top;
  import rtvps_pkg::*;
  localparam int W = 8, H = 6, OM = 3, NF = 3, PW = 8, MW = 36;
  localparam int NFRAMES_IN = 5, PERIOD = NF + 1;

  `include "rtvps_top_check.svh"

  rtvps_top #(.IMG_W(W), .IMG_H(H), .OMEGA(OM), .PIX_W(PW), .NFRAMES(NF), .MEM_W(MW),
              .BURST(4), .FIFO_DEPTH(16)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
