// tb_sync_fifo: random pushes and pops against a queue; checks the head word
// (first-word fall-through), the fill count and the empty/full flags.
module tb_sync_fifo;
  localparam int W = 12, D = 8;
  logic clk = 0, rst_n = 0, wr, rd, empty, full;
  logic [W-1:0] wdata, rdata;
  logic [3:0] count;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0;
  int saw_full = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    wr = 0; rd = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      check("count", int'(count) == q.size());
      check("empty", empty == (q.size() == 0));
      check("full", full == (q.size() == D));
      if (q.size() > 0) check("head", rdata == q[0]);
      if (full) saw_full++;
      // bias toward filling in the first half, draining in the second
      wr = (q.size() < D) && (($urandom % 4) < ((n / 500) % 2 ? 1 : 3));
      rd = (q.size() > 0) && (($urandom % 4) < ((n / 500) % 2 ? 3 : 1));
      wdata = W'($urandom);
      @(posedge clk);
      #1;
      if (rd) void'(q.pop_front());
      if (wr) q.push_back(wdata);
    end
    check("reached full", saw_full > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
