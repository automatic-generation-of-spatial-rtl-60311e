// rtvps_pkg: shared constants, types and sizing functions of the
// spatio-temporal video memory architecture.
//
// The defaults describe the main configuration: a 3x3 spatial window over a
// 7-frame temporal neighbourhood on a 1367x768 stream of 24-bit pixels, with
// the previous frames kept in a 36-bit ZBT SRAM. The sizing functions are the
// design equations of the architecture (boundary-set count, line-buffer width
// of a global memory object, memory operations per pixel); they are used for
// elaboration-time checks and are not hardware.
package rtvps_pkg;

  // Main configuration.
  localparam int unsigned IMG_W_DEF    = 1367; // pixels per line
  localparam int unsigned IMG_H_DEF    = 768;  // lines per frame
  localparam int unsigned PIX_W_DEF    = 24;   // bits per pixel
  localparam int unsigned OMEGA_DEF    = 3;    // spatial window width (odd)
  localparam int unsigned NFRAMES_DEF  = 7;    // temporal depth in frames
  localparam int unsigned BURST_DEF    = 8;    // accesses per scheduled burst
  localparam int unsigned MEM_W_DEF    = 36;   // external memory word width
  localparam int unsigned FIFO_D_DEF   = 32;   // words per temporal-level FIFO
  localparam int unsigned BRAM_SEG_MAX = 32;   // widest block RAM data path

  // Boundary replacement source, selected at run time.
  typedef enum logic {
    BND_CENTRE = 1'b0,  // replace with the centre pixel of the window
    BND_CONST  = 1'b1   // replace with an external constant
  } bnd_mode_e;

  // Kind of one entry of the physical address table.
  typedef enum logic {
    OP_WRITE = 1'b0,
    OP_READ  = 1'b1
  } mem_op_e;

  // One entry of the physical address table: the operation and the temporal
  // level it serves (level 0 is the live frame, which is only written).
  localparam int unsigned PAT_MAX = 16;
  typedef struct packed {
    mem_op_e    op;
    logic [3:0] level;
  } pat_entry_t;
  typedef pat_entry_t [PAT_MAX-1:0] pat_t;

  // Default access pattern: one write burst of the live frame followed by
  // one read burst of every stored frame, level 1 to nframes-1.
  function automatic pat_t default_pat(int unsigned nframes);
    pat_t p;
    for (int i = 0; i < int'(PAT_MAX); i++) begin
      p[i].op    = (i == 0) ? OP_WRITE : OP_READ;
      p[i].level = 4'(i);
    end
    if (nframes > PAT_MAX) p = '0;
    return p;
  endfunction

  // Number of boundary sets of an omega x omega window:
  // b = 4 * ((omega-1)^2/2 - (omega-1)/2).
  function automatic int unsigned boundary_sets(int unsigned omega);
    return 4 * (((omega - 1) * (omega - 1)) / 2 - (omega - 1) / 2);
  endfunction

  // Width of a global memory object: n_lines * pixel width.
  function automatic int unsigned gmo_width(int unsigned n_lines, int unsigned pix_w);
    return n_lines * pix_w;
  endfunction

  // External memory operations per input pixel: one write and one read
  // for every stored previous frame.
  function automatic int unsigned mem_ops_per_pixel(int unsigned nframes);
    return 1 + (nframes - 1);
  endfunction

  // Smallest block RAM data-path width (1,2,4,...,32) that holds w bits.
  function automatic int unsigned bram_port_width(int unsigned w);
    int unsigned p = 1;
    while (p < w) p = p * 2;
    return p;
  endfunction

endpackage
