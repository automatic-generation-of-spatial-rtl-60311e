// zbt_sram_model: behavioural model of a pipelined ZBT synchronous SRAM, for
// simulation only.
//
// The address and control pins are sampled on a rising edge k. A read drives
// the stored word on dq_o after edge k+2 (held until the next edge); a write
// takes its data from dq_i at edge k+3, so reads and writes share the bus
// cycle between edges k+2 and k+3 and follow each other without idle cycles.
// Like the real parts, it forwards a write that is still in its data cycle
// to a read of the same address that follows it directly. The array starts
// at zero. bus_conflict counts write-data cycles in which
// the controller did not drive the bus.
module zbt_sram_model #(
  parameter int unsigned ADDR_W = 10,
  parameter int unsigned DATA_W = 36,
  parameter int unsigned WORDS  = 1 << ADDR_W
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              cen_n,
  input  logic              we_n,
  input  logic [DATA_W-1:0] dq_i,
  input  logic              dq_oe,
  output logic [DATA_W-1:0] dq_o,
  output int                bus_conflict
);

  typedef struct packed {
    logic              valid;
    logic              write;
    logic [ADDR_W-1:0] addr;
  } acc_t;

  logic [DATA_W-1:0] mem [WORDS];
  acc_t p1, p2, p3;

  initial begin
    for (int i = 0; i < int'(WORDS); i++) mem[i] = '0;
    p1 = '0;
    p2 = '0;
    p3 = '0;
    dq_o = '0;
    bus_conflict = 0;
  end

  always @(posedge clk) begin
    p1 <= '{valid: !cen_n, write: !we_n, addr: addr};
    p2 <= p1;
    p3 <= p2;
    // a write still in its data cycle is forwarded to a read of its address
    if (p2.valid && !p2.write)
      dq_o <= (p3.valid && p3.write && p3.addr == p2.addr) ? dq_i : mem[p2.addr];
    if (p3.valid && p3.write) begin
      mem[p3.addr] <= dq_i;
      if (!dq_oe) bus_conflict <= bus_conflict + 1;
    end
  end

endmodule
