// gmo_line_buffer: the line buffers of one operator grouped into a single
// global memory object (GMO), used as a circular buffer.
//
// The GMO holds NL lines (omega-1 for an omega x omega window) of LINE_W bits
// each, where LINE_W is the pixel width times the number of temporal levels
// whose line buffers are grouped together; its total width is NL*LINE_W and
// its length is one image line (DEPTH words). Location addr holds the pixels
// of column addr of the NL most recent lines. Every line has a row slot of its
// own inside the word; the slot being written rotates by one each image line,
// so a new pixel only overwrites the oldest line and no data has to move.
//
// Each row slot is cut into segments no wider than SEG_MAX bits (the widest
// block RAM data path); a remainder is padded to the next power-of-two width
// (48 bits become 32 + 16, as for the dual block RAM mapping of four 12-bit
// lines). Each segment is one read-first block_ram, and a slot's segments are
// write-enabled only while that slot is the one being written.
//
// The grouping into one wide memory object, the 32-bit segment limit and the
// read-then-write cycle follow the original architecture; the rotating row
// slots are this design's way of making one read-then-write per pixel enough.
// Sharing one dual-port block RAM between partitions of two segments is a
// placement matter and is not modelled.
//
// Timing: with en high, the column is read and the new pixel written in the
// same cycle. One cycle later lines[d] holds the pixel of the line d+1 lines
// above the written one (lines[NL-1] is the oldest), re-ordered from the row
// slots with the slot number registered alongside the read.
module gmo_line_buffer
  import rtvps_pkg::*;
#(
  parameter int unsigned DEPTH   = IMG_W_DEF,
  parameter int unsigned NL      = OMEGA_DEF - 1,
  parameter int unsigned LINE_W  = NFRAMES_DEF * PIX_W_DEF,
  parameter int unsigned SEG_MAX = BRAM_SEG_MAX,
  localparam int unsigned AW     = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned SW     = (NL > 1) ? $clog2(NL) : 1
) (
  input  logic              clk,
  input  logic              en,      // pixel present: read column, write new pixel
  input  logic [AW-1:0]     addr,    // column (circular pointer)
  input  logic [SW-1:0]     slot,    // row slot of the line being written
  input  logic [LINE_W-1:0] wdata,   // new pixel(s) of the current line
  output logic [LINE_W-1:0] lines [NL]
);

  localparam int unsigned NSEG_FULL = LINE_W / SEG_MAX;
  localparam int unsigned REM       = LINE_W % SEG_MAX;
  localparam int unsigned NSEG      = NSEG_FULL + ((REM != 0) ? 1 : 0);
  localparam int unsigned REM_PORT  = (REM != 0) ? bram_port_width(REM) : SEG_MAX;

  logic [LINE_W-1:0] slot_rd [NL];
  logic [SW-1:0]     slot_q;

  for (genvar s = 0; s < NL; s++) begin : g_slot
    for (genvar g = 0; g < NSEG; g++) begin : g_seg
      localparam int unsigned LO   = g * SEG_MAX;
      localparam int unsigned BITS = (g < NSEG_FULL) ? SEG_MAX : REM;
      localparam int unsigned PW   = (g < NSEG_FULL) ? SEG_MAX : REM_PORT;
      logic [PW-1:0] wd, rd;
      always_comb begin
        wd = '0;
        wd[BITS-1:0] = wdata[LO +: BITS];
      end
      block_ram #(.WIDTH(PW), .DEPTH(DEPTH)) u_br (
        .clk  (clk),
        .en   (en),
        .we   (slot == SW'(s)),
        .addr (addr),
        .wdata(wd),
        .rdata(rd)
      );
      assign slot_rd[s][LO +: BITS] = rd[BITS-1:0];
    end
  end

  always_ff @(posedge clk) begin
    if (en) slot_q <= slot;
  end

  // The slot just written held the oldest line; the line d+1 above the
  // written one sits in slot (slot - d - 1) mod NL.
  always_comb begin
    for (int d = 0; d < NL; d++) begin
      int idx;
      idx = (int'(slot_q) - d - 1 + 2 * int'(NL)) % int'(NL);
      lines[d] = slot_rd[idx];
    end
  end

endmodule
