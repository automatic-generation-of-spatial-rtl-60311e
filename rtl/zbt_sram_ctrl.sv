// zbt_sram_ctrl: physical controller for a pipelined zero-bus-turnaround
// (ZBT) synchronous SRAM.
//
// A ZBT SRAM accepts a read or a write on every clock with no idle cycle
// between them; the data of an access is on the bus two clock edges after
// the edge that samples its address: a read's data is driven after that
// edge, a write's data is taken at the edge after it. This controller
// therefore needs no scheduling: it registers each request onto the
// address/control pins, keeps the request in a short pipeline, drives the
// write data in the bus cycle of the access (dq_oe high for that cycle) and
// captures the read data at the end of it. Memory speed must then be at least the pixel rate times
// (1 write + one read per stored frame).
//
// The original architecture names a ZBT SRAM controller; the pipeline timing
// here is that of common pipelined ZBT parts, a choice of this design.
//
// Timing: request in cycle t -> pins in t+1 -> memory samples the address at
// the end of t+1 -> write data on dq_o in t+4 / read data on dq_i in t+4 ->
// rd_valid, rd_data and rd_tag (the request's tag) in t+5. One request per
// cycle, reads and writes in any order.
module zbt_sram_ctrl
  import rtvps_pkg::*;
#(
  parameter int unsigned ADDR_W = 23,
  parameter int unsigned DATA_W = MEM_W_DEF,
  parameter int unsigned TAG_W  = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // request side
  input  logic              req_valid,
  input  mem_op_e           req_op,
  input  logic [ADDR_W-1:0] req_addr,
  input  logic [DATA_W-1:0] req_wdata,
  input  logic [TAG_W-1:0]  req_tag,
  output logic              rd_valid,
  output logic [DATA_W-1:0] rd_data,
  output logic [TAG_W-1:0]  rd_tag,
  // SRAM pins
  output logic [ADDR_W-1:0] sram_addr,
  output logic              sram_cen_n,
  output logic              sram_we_n,
  output logic [DATA_W-1:0] sram_dq_o,
  output logic              sram_dq_oe,
  input  logic [DATA_W-1:0] sram_dq_i
);

  typedef struct packed {
    logic              valid;
    logic              write;
    logic [TAG_W-1:0]  tag;
    logic [DATA_W-1:0] wdata;
  } stage_t;

  stage_t s1, s2, s3, s4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_addr  <= '0;
      sram_cen_n <= 1'b1;
      sram_we_n  <= 1'b1;
      s1         <= '0;
      s2         <= '0;
      s3         <= '0;
      s4         <= '0;
      rd_valid   <= 1'b0;
      rd_data    <= '0;
      rd_tag     <= '0;
    end else begin
      sram_addr  <= req_addr;
      sram_cen_n <= !req_valid;
      sram_we_n  <= !(req_valid && req_op == OP_WRITE);
      s1         <= '{valid: req_valid, write: req_op == OP_WRITE, tag: req_tag, wdata: req_wdata};
      s2         <= s1;
      s3         <= s2;
      s4         <= s3;
      rd_valid   <= s4.valid && !s4.write;
      rd_tag     <= s4.tag;
      if (s4.valid && !s4.write) rd_data <= sram_dq_i;
    end
  end

  // write data in the access's bus cycle, two cycles after the address
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sram_dq_o  <= '0;
      sram_dq_oe <= 1'b0;
    end else begin
      sram_dq_o  <= s3.wdata;
      sram_dq_oe <= s3.valid && s3.write;
    end
  end

endmodule
