// rtvps_top: interface and memory architecture of a spatio-temporal
// neighbourhood video filter.
//
// A filter working on an omega x omega x NFRAMES neighbourhood needs, for
// every pixel of a raster video stream, the omega x omega windows around the
// same position in the live frame and in the NFRAMES-1 frames before it, with
// the positions outside the image filled with valid data. This block provides
// exactly that, leaving only the filter function to the user:
//
//   * vdmc stores every live frame in external ZBT SRAM and streams the
//     stored frames back in step with the live pixels (temporal pixel data);
//     with NFRAMES = 1 (a purely spatial filter) it is left out and the
//     memory port stays idle;
//   * a register stage gathers the NFRAMES samples of one position;
//   * slwc buffers omega-1 lines of all levels in one block RAM memory object
//     and forms the NFRAMES spatial windows (temporal windows), replacing the
//     taps outside the image by the window centre or bnd_const;
//   * output_sync delays the frame and line marks to the window centre.
//
// The three-part structure and the default sizes follow the original
// architecture; the single clock, the register stage between the memory
// controller and the window buffers, and the port format are this design's.
//
// Interface: in_valid/in_vsync/in_hsync/in_pix is the raster stream (vsync
// on the first pixel of a frame, hsync on the first pixel of each line), at
// most one pixel every NFRAMES memory cycles plus a small margin for the
// table's skip cycles (the memory runs on clk). out_win[k] is the window of
// level k (0 = live) around the centre pixel, out_valid/out_vsync/out_hsync
// qualify it, out_lvl_ok[k] says level k holds a real frame for this centre.
// Latency from a pixel to the window that ends with it: four cycles. The
// window of a centre is complete (omega-1)/2 lines and (omega-1)/2 pixels
// after the centre entered. underrun/overrun report a stream too fast for
// the memory. The sram_* ports go to the external ZBT SRAM.
module rtvps_top
  import rtvps_pkg::*;
#(
  parameter int unsigned IMG_W      = IMG_W_DEF,
  parameter int unsigned IMG_H      = IMG_H_DEF,
  parameter int unsigned OMEGA      = OMEGA_DEF,
  parameter int unsigned PIX_W      = PIX_W_DEF,
  parameter int unsigned NFRAMES    = NFRAMES_DEF,
  parameter int unsigned MEM_W      = MEM_W_DEF,
  parameter int unsigned BURST      = BURST_DEF,
  parameter int unsigned FIFO_DEPTH = FIFO_D_DEF,
  localparam int unsigned ADDR_W    = $clog2(NFRAMES * IMG_W * IMG_H),
  localparam int unsigned XW        = $clog2(IMG_W),
  localparam int unsigned YW        = $clog2(IMG_H)
) (
  input  logic              clk,
  input  logic              rst_n,
  // video input
  input  logic              in_valid,
  input  logic              in_vsync,
  input  logic              in_hsync,
  input  logic [PIX_W-1:0]  in_pix,
  // boundary replacement
  input  bnd_mode_e         bnd_mode,
  input  logic [PIX_W-1:0]  bnd_const,
  // neighbourhood output to the filter
  output logic              out_valid,
  output logic              out_vsync,
  output logic              out_hsync,
  output logic [PIX_W-1:0]  out_win    [NFRAMES][OMEGA][OMEGA],
  output logic              out_lvl_ok [NFRAMES],
  output logic [XW-1:0]     out_cx,
  output logic [YW-1:0]     out_cy,
  // status
  output logic              underrun,
  output logic              overrun,
  // external ZBT SRAM
  output logic [ADDR_W-1:0] sram_addr,
  output logic              sram_cen_n,
  output logic              sram_we_n,
  output logic [MEM_W-1:0]  sram_dq_o,
  output logic              sram_dq_oe,
  input  logic [MEM_W-1:0]  sram_dq_i
);

  // stored levels (at least one array element when there are none)
  localparam int unsigned NR = (NFRAMES > 1) ? NFRAMES - 1 : 1;

  // ---- temporal pixel data -------------------------------------------------
  logic             taken;
  logic [PIX_W-1:0] lvl_pix [NR];

  if (NFRAMES > 1) begin : g_temporal
    logic lvl_ok [NR];
    logic evt_burst, evt_skip, evt_wrap;

    vdmc #(
      .IMG_W(IMG_W), .IMG_H(IMG_H), .NFRAMES(NFRAMES), .PIX_W(PIX_W), .MEM_W(MEM_W),
      .BURST(BURST), .FIFO_DEPTH(FIFO_DEPTH)
    ) u_vdmc (
      .clk, .rst_n, .in_valid, .in_vsync, .in_pix, .taken, .lvl_pix, .lvl_ok,
      .underrun, .overrun, .evt_burst, .evt_skip, .evt_wrap,
      .sram_addr, .sram_cen_n, .sram_we_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i
    );
  end else begin : g_spatial
    // A purely spatial filter needs no external frame store: the memory
    // port stays idle and the stream is taken from its first frame start.
    logic started;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                    started <= 1'b0;
      else if (in_valid && in_vsync) started <= 1'b1;
    end
    assign taken      = in_valid && (started || in_vsync);
    assign lvl_pix[0] = sram_dq_i[PIX_W-1:0];  // unused: no stored level
    assign underrun   = 1'b0;
    assign overrun    = 1'b0;
    assign sram_addr  = '0;
    assign sram_cen_n = 1'b1;
    assign sram_we_n  = 1'b1;
    assign sram_dq_o  = '0;
    assign sram_dq_oe = 1'b0;
  end

  logic             t_valid, t_vsync, t_hsync;
  logic [PIX_W-1:0] t_pix [NFRAMES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_valid <= 1'b0;
      t_vsync <= 1'b0;
      t_hsync <= 1'b0;
    end else begin
      t_valid <= taken;
      t_vsync <= taken && in_vsync;
      t_hsync <= taken && in_hsync;
    end
  end

  always_ff @(posedge clk) begin
    if (taken) begin
      t_pix[0] <= in_pix;
      for (int k = 1; k < int'(NFRAMES); k++) t_pix[k] <= lvl_pix[k-1];
    end
  end

  // ---- temporal windows ----------------------------------------------------
  logic w_valid;

  slwc #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .OMEGA(OMEGA), .PIX_W(PIX_W), .NLEV(NFRAMES)
  ) u_slwc (
    .clk, .rst_n, .in_valid(t_valid), .in_vsync(t_vsync), .in_hsync(t_hsync),
    .in_pix(t_pix), .bnd_mode, .bnd_const, .out_valid(w_valid), .out_win,
    .out_cx, .out_cy
  );

  // ---- synchronisation and control -----------------------------------------
  output_sync #(.IMG_W(IMG_W), .OMEGA(OMEGA)) u_osync (
    .clk, .rst_n, .in_valid(t_valid), .in_vsync(t_vsync), .in_hsync(t_hsync),
    .out_valid, .out_vsync, .out_hsync
  );

  // Frames started at the output: level k is real from the k-th frame on.
  logic [3:0] out_frames;
  logic [3:0] out_frames_now;

  assign out_frames_now = (out_valid && out_vsync && out_frames != 4'(NFRAMES))
                        ? out_frames + 1'b1 : out_frames;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_frames <= '0;
    else        out_frames <= out_frames_now;
  end

  always_comb begin
    for (int k = 0; k < int'(NFRAMES); k++) out_lvl_ok[k] = int'(out_frames_now) > k;
  end

  a_paths_aligned: assert property (@(posedge clk) disable iff (!rst_n) out_valid |-> w_valid);

endmodule
