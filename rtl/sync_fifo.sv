// sync_fifo: first-word-fall-through FIFO that lines up one temporal level
// with the video stream.
//
// One FIFO per temporal level follows the original architecture; the depth
// and the first-word-fall-through style are choices of this design.
//
// The memory controller fills it in bursts from the frame store (or, for the
// write path, the stream fills it pixel by pixel); the other side takes one
// word per pixel. The head word is always visible on rdata while empty is
// low, so a pixel can be matched with its stored neighbours in the same cycle
// it arrives. count reports the fill level so a scheduler can reserve room
// for a whole burst. Writing when full or reading when empty is a protocol
// error and is asserted against; such an access is ignored.
module sync_fifo #(
  parameter int unsigned WIDTH = 36,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             rd,
  output logic [WIDTH-1:0] rdata,
  output logic             empty,
  output logic             full,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign do_wr = wr && !full;
  assign do_rd = rd && !empty;
  assign rdata = mem[rp];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wdata;
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd |-> !empty);

endmodule
