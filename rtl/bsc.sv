// bsc: boundary state controller of the sliding window.
//
// It follows the input stream's synchronisation signals to know the column
// and line of every incoming pixel, and from them the position of the window
// centre, which trails the input by (omega-1)/2 lines and (omega-1)/2 pixels
// (the newest pixel sits in the bottom-right corner of the window). For that
// centre it marks every window tap whose image position lies outside the
// image: left or right of the line, above the first or below the last line.
// Those taps hold pixels of the previous or next line or frame and must be
// replaced by the pixel switch. A tap is flagged when it falls outside,
// whichever of the boundary sets the window is in.
//
// The controller's task (follow the syncs, find the taps outside the image)
// follows the original architecture; building it from position counters and
// per-tap comparisons rather than one state per boundary case, and the sync
// format below, are choices of this design.
//
// Interface: a pixel is present when in_valid is high; in_vsync marks the
// first pixel of a frame and in_hsync the first pixel of every line
// (in_vsync alone also starts a line). col/row/line_start describe the
// present pixel combinationally and drive the line buffers. replace[r][c]
// (row r from the top, column c from the left of the window) and the centre
// position are registered: they belong to the pixel of the previous valid
// cycle and change only when a pixel is present.
module bsc
  import rtvps_pkg::*;
#(
  parameter int unsigned IMG_W = IMG_W_DEF,
  parameter int unsigned IMG_H = IMG_H_DEF,
  parameter int unsigned OMEGA = OMEGA_DEF,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          in_vsync,
  input  logic          in_hsync,
  output logic [XW-1:0] col,         // column of the present pixel
  output logic [YW-1:0] row,         // line of the present pixel
  output logic          line_start,  // present pixel starts a line
  output logic [XW-1:0] cx,          // window centre column
  output logic [YW-1:0] cy,          // window centre line
  output logic          replace [OMEGA][OMEGA]
);

  localparam int H = (int'(OMEGA) - 1) / 2;

  logic [XW-1:0] x_q;
  logic [YW-1:0] y_q;
  logic          first;   // no pixel seen since reset

  // Position of the present pixel.
  always_comb begin
    line_start = in_vsync || in_hsync;
    if (in_vsync || first) begin
      col = '0;
      row = '0;
    end else if (in_hsync) begin
      col = '0;
      row = (y_q == YW'(IMG_H - 1)) ? '0 : y_q + 1'b1;
    end else begin
      col = x_q + 1'b1;
      row = y_q;
    end
  end

  // Centre position and out-of-image taps for the present pixel.
  int cxi, cyi;
  logic rep_d [OMEGA][OMEGA];
  always_comb begin
    cxi = int'(col) - H;
    cyi = int'(row) - H;
    if (cxi < 0) begin
      cxi = cxi + int'(IMG_W);
      cyi = cyi - 1;
    end
    if (cyi < 0) cyi = cyi + int'(IMG_H);
    for (int r = 0; r < int'(OMEGA); r++) begin
      for (int c = 0; c < int'(OMEGA); c++) begin
        rep_d[r][c] = (cyi - H + r < 0) || (cyi - H + r >= int'(IMG_H)) ||
                      (cxi - H + c < 0) || (cxi - H + c >= int'(IMG_W));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q   <= '0;
      y_q   <= '0;
      first <= 1'b1;
      cx    <= '0;
      cy    <= '0;
      for (int r = 0; r < int'(OMEGA); r++)
        for (int c = 0; c < int'(OMEGA); c++) replace[r][c] <= 1'b1;
    end else if (in_valid) begin
      x_q     <= col;
      y_q     <= row;
      first   <= 1'b0;
      cx      <= XW'(cxi);
      cy      <= YW'(cyi);
      replace <= rep_d;
    end
  end

endmodule
