// vdmc: video data memory controller for the temporal levels.
//
// Every live pixel is written to a frame store in external ZBT SRAM, and for
// each stored level k = 1..NFRAMES-1 the pixel at the same position k frames
// earlier is read back, so that all NFRAMES temporal samples of a position
// are available together. The pieces are those of the memory controller
// architecture: a write FIFO for the live stream, one read FIFO per stored
// level (sync_fifo), the address controller with its physical address table
// and address counters (vdmc_addr_ctrl), and the physical memory controller
// (zbt_sram_ctrl). The read FIFOs prefetch ahead of the stream in bursts, so
// each live pixel finds its stored neighbours at the FIFO heads.
//
// The structure (write and read FIFOs, address controller with its table,
// physical controller) follows the original architecture; start-up priming,
// the sticky error flags and one pixel per memory word are this design's.
//
// Interface: pixels are ignored until a frame start finds every read FIFO
// holding at least one burst (about NFRAMES*BURST cycles after reset); from
// that in_vsync on every in_valid pixel is taken (taken high), and frames
// are IMG_W*IMG_H pixels long. lvl_pix[k-1] is the level-k pixel of the
// pixel presented on in_pix, combinationally in the same cycle; lvl_ok[k-1] says the level already holds a real frame (k
// frame starts have passed). A pixel arriving with the write FIFO full or a
// read FIFO empty sets the sticky overrun/underrun flag: the memory is then
// slower than the pixel rate times (1 + NFRAMES-1) plus the skip cycles of
// the table, and the stored levels of that frame are no longer aligned.
// Memory words are MEM_W bits, one pixel per word, zero-padded.
module vdmc
  import rtvps_pkg::*;
#(
  parameter int unsigned IMG_W      = IMG_W_DEF,
  parameter int unsigned IMG_H      = IMG_H_DEF,
  parameter int unsigned NFRAMES    = NFRAMES_DEF,
  parameter int unsigned PIX_W      = PIX_W_DEF,
  parameter int unsigned MEM_W      = MEM_W_DEF,
  parameter int unsigned BURST      = BURST_DEF,
  parameter int unsigned FIFO_DEPTH = FIFO_D_DEF,
  localparam int unsigned ADDR_W    = $clog2(NFRAMES * IMG_W * IMG_H),
  localparam int unsigned NR        = NFRAMES - 1,
  localparam int unsigned CW        = $clog2(FIFO_DEPTH + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // live stream
  input  logic              in_valid,
  input  logic              in_vsync,
  input  logic [PIX_W-1:0]  in_pix,
  // stored levels, for the pixel on in_pix
  output logic              taken,   // in_valid pixel is part of the stream
  output logic [PIX_W-1:0]  lvl_pix [NR],
  output logic              lvl_ok  [NR],
  output logic              underrun,
  output logic              overrun,
  // activity, one pulse each
  output logic              evt_burst,
  output logic              evt_skip,
  output logic              evt_wrap,
  // ZBT SRAM pins
  output logic [ADDR_W-1:0] sram_addr,
  output logic              sram_cen_n,
  output logic              sram_we_n,
  output logic [MEM_W-1:0]  sram_dq_o,
  output logic              sram_dq_oe,
  input  logic [MEM_W-1:0]  sram_dq_i
);

  logic accept, started, primed;
  assign accept = in_valid && (started || (in_vsync && primed));
  assign taken  = accept;

  // ---- write FIFO --------------------------------------------------------
  logic [MEM_W-1:0] wf_data;
  logic [CW-1:0]    wf_count;
  logic             wf_full, wf_empty, wf_pop;

  sync_fifo #(.WIDTH(MEM_W), .DEPTH(FIFO_DEPTH)) u_wfifo (
    .clk, .rst_n, .wr(accept && !wf_full), .wdata(MEM_W'(in_pix)),
    .rd(wf_pop), .rdata(wf_data), .empty(wf_empty), .full(wf_full), .count(wf_count)
  );

  // ---- address controller ------------------------------------------------
  logic              req_valid;
  mem_op_e           req_op;
  logic [ADDR_W-1:0] req_addr;
  logic [3:0]        req_level;
  logic              rd_valid;
  logic [MEM_W-1:0]  rd_data;
  logic [3:0]        rd_tag;
  logic [CW-1:0]     rf_count [NR];

  vdmc_addr_ctrl #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .NFRAMES(NFRAMES), .BURST(BURST), .FIFO_DEPTH(FIFO_DEPTH)
  ) u_adr (
    .clk, .rst_n, .wf_count, .rf_count, .rd_ret_valid(rd_valid), .rd_ret_level(rd_tag),
    .req_valid, .req_op, .req_addr, .req_level, .wf_pop, .evt_burst, .evt_skip, .evt_wrap
  );

  // ---- physical memory controller ----------------------------------------
  zbt_sram_ctrl #(.ADDR_W(ADDR_W), .DATA_W(MEM_W), .TAG_W(4)) u_phy (
    .clk, .rst_n, .req_valid, .req_op, .req_addr, .req_wdata(wf_data), .req_tag(req_level),
    .rd_valid, .rd_data, .rd_tag,
    .sram_addr, .sram_cen_n, .sram_we_n, .sram_dq_o, .sram_dq_oe, .sram_dq_i
  );

  // ---- read FIFOs, one per stored level ------------------------------------
  logic rf_empty [NR];
  for (genvar k = 0; k < NR; k++) begin : g_lvl
    logic [MEM_W-1:0] q;
    logic             full_unused;
    sync_fifo #(.WIDTH(MEM_W), .DEPTH(FIFO_DEPTH)) u_rfifo (
      .clk, .rst_n, .wr(rd_valid && rd_tag == 4'(k + 1)), .wdata(rd_data),
      .rd(accept && !rf_empty[k]), .rdata(q), .empty(rf_empty[k]), .full(full_unused),
      .count(rf_count[k])
    );
    assign lvl_pix[k] = q[PIX_W-1:0];
  end

  // ---- frame bookkeeping and status ----------------------------------------
  // The stream is taken from the first frame start at which every read FIFO
  // already holds a burst, so that no stored level is late for the first
  // pixels after reset.
  always_comb begin
    primed = 1'b1;
    for (int k = 0; k < int'(NR); k++) if (32'(rf_count[k]) < BURST) primed = 1'b0;
  end

  logic [3:0] frames;   // frame starts seen, saturating at NFRAMES

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started  <= 1'b0;
      frames   <= '0;
      underrun <= 1'b0;
      overrun  <= 1'b0;
    end else if (accept) begin
      started <= 1'b1;
      if (in_vsync && frames != 4'(NFRAMES)) frames <= frames + 1'b1;
      if (wf_full) overrun <= 1'b1;
      for (int k = 0; k < int'(NR); k++) if (rf_empty[k]) underrun <= 1'b1;
    end
  end

  // level k is real once the pixel belongs to frame number k or later
  always_comb begin
    for (int k = 0; k < int'(NR); k++)
      lvl_ok[k] = (int'(frames) + ((in_vsync && frames != 4'(NFRAMES)) ? 1 : 0)) > k + 1;
  end

  a_wf_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) wf_pop |-> !wf_empty);

endmodule
