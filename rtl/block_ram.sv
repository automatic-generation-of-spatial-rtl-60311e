// block_ram: one block RAM segment used in read-first mode.
//
// On a clock edge with en high the word at addr is read onto rdata and, if
// we is high, the same location is then overwritten with wdata. Read and
// write of the same location therefore happen in one cycle, the old contents
// appearing on rdata one cycle after the address: this is the read-then-write
// cycle of the circular line buffers. The block is written as an inferred
// memory array; mapping it onto a vendor primitive (a Spartan-3 block RAM
// holds 16 Kibit without parity at data widths of 1 to 32 bits) is left to
// synthesis. rdata holds its value while en is low. Contents are not reset.
module block_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      rdata <= mem[addr];
      if (we) mem[addr] <= wdata;
    end
  end

endmodule
