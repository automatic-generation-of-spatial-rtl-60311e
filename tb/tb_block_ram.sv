// tb_block_ram: random reads and writes against a reference array; checks
// that a write returns the old word (read-first) one cycle after the address.
module tb_block_ram;
  localparam int W = 16, D = 20;
  logic clk = 0, en, we;
  logic [4:0] addr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] ref_mem [D];
  int checks = 0, failures = 0;

  block_ram #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expect_q;
    logic         chk;
    en = 0; we = 0; addr = 0; wdata = 0;
    // fill
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      en = 1; we = 1; addr = 5'(i); wdata = W'(i * 37 + 5);
      ref_mem[i] = wdata;
    end
    chk = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (chk) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          $display("mismatch n=%0d got %h exp %h", n, rdata, expect_q);
        end
      end
      en    = ($urandom % 4) != 0;
      we    = $urandom % 2;
      addr  = 5'($urandom % D);
      wdata = W'($urandom);
      chk   = en;
      if (en) begin
        expect_q = ref_mem[addr];
        if (we) ref_mem[addr] = wdata;
      end else if (chk == 0) begin
        // rdata must hold while en is low
      end
    end
    // hold check: rdata keeps its value while en is low
    @(negedge clk);
    en = 1; we = 0; addr = 3; expect_q = ref_mem[3];
    @(negedge clk);
    en = 0; addr = 4;
    repeat (3) @(negedge clk);
    checks++;
    if (rdata !== expect_q) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
