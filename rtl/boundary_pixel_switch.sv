// boundary_pixel_switch: replaces the window taps that fall outside the image.
//
// Every tap flagged by the boundary state controller is replaced, either by
// the centre pixel of the window, W((omega+1)/2,(omega+1)/2), which always
// lies inside the image, or by an external constant; bnd_mode chooses
// between the two at run time (the original allows either source; making it
// a run-time input is this design's choice). Unflagged taps pass unchanged.
// The switch is one register stage: out_win is valid one cycle after
// in_win/replace, qualified by out_valid.
module boundary_pixel_switch
  import rtvps_pkg::*;
#(
  parameter int unsigned OMEGA = OMEGA_DEF,
  parameter int unsigned PIX_W = PIX_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [PIX_W-1:0] in_win  [OMEGA][OMEGA],
  input  logic             replace [OMEGA][OMEGA],
  input  bnd_mode_e        bnd_mode,
  input  logic [PIX_W-1:0] bnd_const,
  output logic             out_valid,
  output logic [PIX_W-1:0] out_win [OMEGA][OMEGA]
);

  localparam int unsigned C = (OMEGA - 1) / 2;

  logic [PIX_W-1:0] fill;
  assign fill = (bnd_mode == BND_CONST) ? bnd_const : in_win[C][C];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int r = 0; r < int'(OMEGA); r++)
        for (int c = 0; c < int'(OMEGA); c++)
          out_win[r][c] <= replace[r][c] ? fill : in_win[r][c];
    end
  end

endmodule
