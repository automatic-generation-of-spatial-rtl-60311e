// vdmc_addr_ctrl: address controller of the video data memory controller.
//
// The frame store in external memory holds NFRAMES frames back to back, used
// as a circular buffer of frame slots. Configurable counters generate the
// addresses: the write counter runs through the whole store, one address per
// live pixel, and the read counter of level k runs k frames (k*IMG_W*IMG_H
// words) behind it, so it returns the pixel at the same position k frames
// earlier. The address space follows from the image width and height.
//
// The physical address table PAT, fixed at compile time, lists the order of
// the accesses: each entry is a write burst of the live frame or a read burst
// of one stored level. The controller walks the table cyclically. An entry
// whose burst cannot run (fewer than BURST pixels waiting in the write FIFO,
// or, for a read, not enough free room in that level's FIFO once the reads
// already in flight are counted) is skipped in one cycle; otherwise its
// BURST accesses are issued on consecutive cycles, the first in the cycle
// the entry is examined. Each access is one request to the physical memory
// controller; writes pop the write FIFO in the same cycle.
//
// The table and the counters follow the original architecture; the frame
// slot layout, the table format and the skip policy are this design's.
//
// evt_burst/evt_skip/evt_wrap pulse when a burst starts, an entry is
// skipped, or the write counter wraps from the last frame slot to the first.
// IMG_W*IMG_H must be a multiple of BURST.
module vdmc_addr_ctrl
  import rtvps_pkg::*;
#(
  parameter int unsigned IMG_W      = IMG_W_DEF,
  parameter int unsigned IMG_H      = IMG_H_DEF,
  parameter int unsigned NFRAMES    = NFRAMES_DEF,
  parameter int unsigned BURST      = BURST_DEF,
  parameter int unsigned FIFO_DEPTH = FIFO_D_DEF,
  parameter int unsigned PAT_LEN    = NFRAMES,
  parameter pat_t        PAT        = default_pat(NFRAMES),
  localparam int unsigned FRAME     = IMG_W * IMG_H,
  localparam int unsigned TOTAL     = NFRAMES * FRAME,
  localparam int unsigned ADDR_W    = $clog2(TOTAL),
  localparam int unsigned CW        = $clog2(FIFO_DEPTH + 1),
  localparam int unsigned NR        = NFRAMES - 1,
  localparam int unsigned BW        = $clog2(BURST + 1),
  localparam int unsigned IW        = (PAT_LEN > 1) ? $clog2(PAT_LEN) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [CW-1:0]     wf_count,            // words in the write FIFO
  input  logic [CW-1:0]     rf_count [NR],       // words in read FIFO of level 1..NR
  input  logic              rd_ret_valid,        // a read returns from memory
  input  logic [3:0]        rd_ret_level,
  output logic              req_valid,
  output mem_op_e           req_op,
  output logic [ADDR_W-1:0] req_addr,
  output logic [3:0]        req_level,
  output logic              wf_pop,
  output logic              evt_burst,
  output logic              evt_skip,
  output logic              evt_wrap
);

  logic [IW-1:0]     idx;
  logic              active;
  logic [BW-1:0]     left;            // accesses left in the running burst
  logic [ADDR_W-1:0] wr_addr;
  logic [ADDR_W-1:0] rd_addr [NR];
  logic [CW-1:0]     inflight [NR];   // reads issued, not yet returned

  pat_entry_t ent;
  logic       can_go;
  int         lv;

  always_comb begin
    ent = PAT[idx];
    lv  = (int'(ent.level) >= 1 && int'(ent.level) <= int'(NR)) ? int'(ent.level) - 1 : 0;
    if (ent.op == OP_WRITE)
      can_go = (32'(wf_count) >= BURST);
    else
      can_go = (32'(rf_count[lv]) + 32'(inflight[lv]) + BURST <= FIFO_DEPTH);
    req_valid = active || can_go;
    req_op    = ent.op;
    req_level = ent.level;
    req_addr  = (ent.op == OP_WRITE) ? wr_addr : rd_addr[lv];
    wf_pop    = req_valid && (ent.op == OP_WRITE);
    evt_burst = !active && can_go;
    evt_skip  = !active && !can_go;
    evt_wrap  = wf_pop && (wr_addr == ADDR_W'(TOTAL - 1));
  end

  function automatic logic [ADDR_W-1:0] inc_addr(logic [ADDR_W-1:0] a);
    return (a == ADDR_W'(TOTAL - 1)) ? '0 : a + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      active  <= 1'b0;
      left    <= '0;
      wr_addr <= '0;
      for (int k = 0; k < int'(NR); k++) begin
        rd_addr[k]  <= ADDR_W'(TOTAL - (k + 1) * FRAME);
        inflight[k] <= '0;
      end
    end else begin
      // burst sequencing over the table
      if (!active) begin
        if (can_go && BURST > 1) begin
          active <= 1'b1;
          left   <= BW'(BURST - 1);
        end else begin
          idx <= (idx == IW'(PAT_LEN - 1)) ? '0 : idx + 1'b1;
        end
      end else if (left == BW'(1)) begin
        active <= 1'b0;
        idx    <= (idx == IW'(PAT_LEN - 1)) ? '0 : idx + 1'b1;
      end else begin
        left <= left - 1'b1;
      end
      // address counters
      if (req_valid) begin
        if (ent.op == OP_WRITE) wr_addr <= inc_addr(wr_addr);
        else rd_addr[lv] <= inc_addr(rd_addr[lv]);
      end
      // reads in flight per level
      for (int k = 0; k < int'(NR); k++) begin
        inflight[k] <= inflight[k]
                     + CW'(req_valid && ent.op == OP_READ && lv == k)
                     - CW'(rd_ret_valid && int'(rd_ret_level) == k + 1);
      end
    end
  end

  initial begin
    assert (FRAME % BURST == 0) else $error("frame size must be a multiple of BURST");
    assert (BURST <= FIFO_DEPTH) else $error("BURST must fit in a FIFO");
    assert (NFRAMES >= 2 && NFRAMES <= PAT_MAX) else $error("NFRAMES out of range");
  end

endmodule
