// slwc: sliding window controller for NLEV temporal levels.
//
// It turns NLEV synchronous pixel streams (level 0 is the live frame, level k
// the frame k periods earlier) into one omega x omega window per level around
// a common centre, with every tap outside the image replaced. The omega-1
// previous lines of all levels are held in one global memory object
// (gmo_line_buffer) whose row slots rotate once per line. Each valid pixel
// reads the column it falls in and overwrites that column's oldest line in
// the same cycle; the column read, topped by the new pixels, is shifted into
// omega x omega window registers. The boundary state controller (bsc) flags
// the taps outside the image and the boundary pixel switch replaces them by
// the window centre or by bnd_const, selected by bnd_mode.
//
// The composition (line buffers, boundary controller, pixel switch) follows
// the original architecture; sharing one controller and one memory object
// among all temporal levels is a choice of this design.
//
// Interface: in_valid/in_vsync/in_hsync qualify in_pix as described for bsc.
// out_win[k][r][c] is the level-k pixel at line cy-(omega-1)/2+r and column
// cx-(omega-1)/2+c, where (cx,cy) is the pixel that entered (omega-1)/2 lines
// and (omega-1)/2 pixels earlier. Latency: out_valid follows in_valid by
// three cycles (line buffer read, window shift, pixel switch). The windows
// around the centres of the last (omega-1)/2 lines of a frame come out while
// the first lines of the next frame go in. At most one pixel per cycle.
module slwc
  import rtvps_pkg::*;
#(
  parameter int unsigned IMG_W = IMG_W_DEF,
  parameter int unsigned IMG_H = IMG_H_DEF,
  parameter int unsigned OMEGA = OMEGA_DEF,
  parameter int unsigned PIX_W = PIX_W_DEF,
  parameter int unsigned NLEV  = NFRAMES_DEF,
  localparam int unsigned XW   = $clog2(IMG_W),
  localparam int unsigned YW   = $clog2(IMG_H)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic             in_vsync,
  input  logic             in_hsync,
  input  logic [PIX_W-1:0] in_pix   [NLEV],
  input  bnd_mode_e        bnd_mode,
  input  logic [PIX_W-1:0] bnd_const,
  output logic             out_valid,
  output logic [PIX_W-1:0] out_win  [NLEV][OMEGA][OMEGA],
  output logic [XW-1:0]    out_cx,   // centre of out_win
  output logic [YW-1:0]    out_cy
);

  localparam int unsigned NL     = OMEGA - 1;
  localparam int unsigned SW     = (NL > 1) ? $clog2(NL) : 1;
  localparam int unsigned LINE_W = NLEV * PIX_W;

  // ---- boundary state controller -----------------------------------------
  logic [XW-1:0] col, cx_b;
  logic [YW-1:0] row, cy_b;
  logic          line_start;
  logic          rep_b [OMEGA][OMEGA];

  bsc #(.IMG_W(IMG_W), .IMG_H(IMG_H), .OMEGA(OMEGA)) u_bsc (
    .clk, .rst_n, .in_valid, .in_vsync, .in_hsync,
    .col, .row, .line_start, .cx(cx_b), .cy(cy_b), .replace(rep_b)
  );

  // ---- line buffers (one GMO for all levels) -----------------------------
  logic [SW-1:0]     slot_q, slot_cur;
  logic [LINE_W-1:0] wdata;
  logic [LINE_W-1:0] lines [NL];

  always_comb begin
    slot_cur = slot_q;
    if (line_start) slot_cur = (slot_q == SW'(NL - 1)) ? '0 : slot_q + 1'b1;
    for (int k = 0; k < int'(NLEV); k++) wdata[k*PIX_W +: PIX_W] = in_pix[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        slot_q <= '0;
    else if (in_valid) slot_q <= slot_cur;
  end

  gmo_line_buffer #(.DEPTH(IMG_W), .NL(NL), .LINE_W(LINE_W)) u_gmo (
    .clk, .en(in_valid), .addr(col), .slot(slot_cur), .wdata, .lines
  );

  // ---- window registers --------------------------------------------------
  logic             v1, v2;
  logic [PIX_W-1:0] pix_q [NLEV];
  logic [PIX_W-1:0] win   [NLEV][OMEGA][OMEGA];
  logic             rep_q [OMEGA][OMEGA];
  logic [XW-1:0]    cx_q;
  logic [YW-1:0]    cy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      v2 <= 1'b0;
    end else begin
      v1 <= in_valid;
      v2 <= v1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) pix_q <= in_pix;
    if (v1) begin
      for (int k = 0; k < int'(NLEV); k++) begin
        for (int r = 0; r < int'(OMEGA); r++) begin
          for (int c = 0; c < int'(OMEGA) - 1; c++) win[k][r][c] <= win[k][r][c+1];
          // bottom row is the new pixel, row OMEGA-2-d the line d+1 above it
          if (r == int'(OMEGA) - 1) win[k][r][OMEGA-1] <= pix_q[k];
          else win[k][r][OMEGA-1] <= lines[OMEGA-2-r][k*PIX_W +: PIX_W];
        end
      end
      rep_q <= rep_b;
      cx_q  <= cx_b;
      cy_q  <= cy_b;
    end
    if (v2) begin
      out_cx <= cx_q;
      out_cy <= cy_q;
    end
  end

  // ---- boundary pixel switch, one per level --------------------------------
  logic ov [NLEV];
  for (genvar k = 0; k < NLEV; k++) begin : g_sw
    boundary_pixel_switch #(.OMEGA(OMEGA), .PIX_W(PIX_W)) u_sw (
      .clk, .rst_n, .in_valid(v2), .in_win(win[k]), .replace(rep_q),
      .bnd_mode, .bnd_const, .out_valid(ov[k]), .out_win(out_win[k])
    );
  end
  assign out_valid = ov[0];

endmodule
