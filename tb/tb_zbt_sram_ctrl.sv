// tb_zbt_sram_ctrl: the controller drives the ZBT SRAM model with random
// back-to-back reads and writes (no idle cycles between them). Read data and
// tags are checked against a reference array, and each read must return
// exactly five cycles after its request.
module tb_zbt_sram_ctrl;
  import rtvps_pkg::*;
  localparam int AW = 6, DW = 36;
  logic clk = 0, rst_n = 0;
  logic req_valid;
  mem_op_e req_op;
  logic [AW-1:0] req_addr;
  logic [DW-1:0] req_wdata;
  logic [3:0] req_tag;
  logic rd_valid;
  logic [DW-1:0] rd_data;
  logic [3:0] rd_tag;
  logic [AW-1:0] sram_addr;
  logic sram_cen_n, sram_we_n, sram_dq_oe;
  logic [DW-1:0] sram_dq_o, sram_dq_i;
  int bus_conflict;
  int checks = 0, failures = 0;

  zbt_sram_ctrl #(.ADDR_W(AW), .DATA_W(DW)) dut (.*);
  zbt_sram_model #(.ADDR_W(AW), .DATA_W(DW)) mem (
    .clk, .addr(sram_addr), .cen_n(sram_cen_n), .we_n(sram_we_n),
    .dq_i(sram_dq_o), .dq_oe(sram_dq_oe), .dq_o(sram_dq_i), .bus_conflict);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [DW-1:0] ref_mem [1 << AW];
  typedef struct { int cyc; logic [DW-1:0] data; logic [3:0] tag; } exp_t;
  exp_t expq [$];
  int cyc = 0;
  int n_rw_turn = 0, conflict0;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && rd_valid) begin
    exp_t e;
    checks++;
    if (expq.size() == 0) begin
      failures++;
    end else begin
      e = expq.pop_front();
      if (rd_data !== e.data || rd_tag !== e.tag || cyc != e.cyc + 5) begin
        failures++;
        $display("FAIL read: got %h/%0d at %0d exp %h/%0d at %0d", rd_data, rd_tag, cyc, e.data, e.tag, e.cyc + 5);
      end
    end
  end

  initial begin
    mem_op_e last;
    for (int i = 0; i < (1 << AW); i++) ref_mem[i] = '0;
    req_valid = 0; req_op = OP_READ; req_addr = 0; req_wdata = 0; req_tag = 0;
    last = OP_READ;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    conflict0 = bus_conflict;  // pin states before the first clock do not count
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      req_valid = ($urandom % 8) != 0;
      req_op    = mem_op_e'($urandom % 2);
      req_addr  = AW'($urandom % 16);
      req_wdata = DW'({$urandom, $urandom});
      req_tag   = 4'($urandom);
      if (req_valid) begin
        if (req_op == OP_WRITE) ref_mem[req_addr] = req_wdata;
        else expq.push_back('{cyc, ref_mem[req_addr], req_tag});
        if (req_op != last) n_rw_turn++;
        last = req_op;
      end
    end
    @(negedge clk);
    req_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0 || bus_conflict != conflict0 || n_rw_turn == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
