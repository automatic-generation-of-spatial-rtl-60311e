// output_sync: synchronisation of the output stream with the window centre.
//
// The window produced by the sliding window controller is centred on the
// pixel that entered (omega-1)/2 lines and (omega-1)/2 pixels before the
// newest one, so the frame and line start marks must be delayed by
// D = (omega-1)/2 * IMG_W + (omega-1)/2 pixels. They are kept in a read-first
// circular buffer of D locations (the same read-then-write cycle as the line
// buffers): each valid pixel reads the marks stored D pixels ago and writes
// its own in their place. Two further register stages line the marks up
// with the three-cycle latency of the window path.
//
// The original architecture names this synchronisation block and gives it
// block RAM; the delay-line construction is this design's.
//
// out_valid is high for every window whose centre is a pixel of the input
// stream: the buffer must have been filled once, and the centre must lie at
// or after the first frame start, so the windows of the start-up pixels are
// suppressed. out_vsync/out_hsync mark the first centre of a frame/line.
module output_sync
  import rtvps_pkg::*;
#(
  parameter int unsigned IMG_W = IMG_W_DEF,
  parameter int unsigned OMEGA = OMEGA_DEF,
  localparam int unsigned D    = ((OMEGA - 1) / 2) * IMG_W + (OMEGA - 1) / 2,
  localparam int unsigned AW   = $clog2(D + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_vsync,
  input  logic in_hsync,
  output logic out_valid,
  output logic out_vsync,
  output logic out_hsync
);

  logic [AW-1:0] ptr;
  logic [AW-1:0] fill;     // pixels written, saturating at D
  logic          started;  // a frame start has been seen
  logic [2:0]    wmark, rmark;
  logic          v1, v2, full1, full2;
  logic [2:0]    mark2;

  assign wmark = {started || in_vsync, in_vsync, in_hsync || in_vsync};

  block_ram #(.WIDTH(3), .DEPTH(D)) u_dly (
    .clk, .en(in_valid), .we(1'b1), .addr(ptr[$clog2(D)-1:0]), .wdata(wmark), .rdata(rmark)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr       <= '0;
      fill      <= '0;
      started   <= 1'b0;
      v1        <= 1'b0;
      v2        <= 1'b0;
      full1     <= 1'b0;
      full2     <= 1'b0;
      mark2     <= '0;
      out_valid <= 1'b0;
      out_vsync <= 1'b0;
      out_hsync <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
      if (in_valid) begin
        ptr     <= (ptr == AW'(D - 1)) ? '0 : ptr + 1'b1;
        if (fill != AW'(D)) fill <= fill + 1'b1;
        full1   <= (fill == AW'(D));
        started <= started || in_vsync;
      end
      if (v1) begin
        full2 <= full1;
        mark2 <= rmark;
      end
      out_valid <= v2 && full2 && mark2[2];
      if (v2) begin
        out_vsync <= full2 && mark2[2] && mark2[1];
        out_hsync <= full2 && mark2[2] && mark2[0];
      end
    end
  end

endmodule
