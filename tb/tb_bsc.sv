// tb_bsc: two frames of a 7x5 image through a 5x5 boundary state controller,
// with idle cycles. The pixel position, the window centre (trailing by two
// lines and two pixels) and the out-of-image mask are checked against a
// raster-index reference; every boundary case seen is counted.
module tb_bsc;
  localparam int W = 7, H = 5, OM = 5, HH = 2;
  localparam int DLY = HH * W + HH;
  logic clk = 0, rst_n = 0, in_valid = 0, in_vsync = 0, in_hsync = 0;
  logic [2:0] col, cx;
  logic [2:0] row, cy;
  logic line_start;
  logic replace [OM][OM];
  int checks = 0, failures = 0;
  bit masks_seen [int];

  bsc #(.IMG_W(W), .IMG_H(H), .OMEGA(OM)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2 * W * H + DLY; i++) begin
      int x, y, ci, ecx, ecy, key;
      x = (i % (W * H)) % W;
      y = (i % (W * H)) / W;
      while (($urandom % 4) == 0) begin
        @(negedge clk);
        in_valid = 0;
      end
      @(negedge clk);
      in_valid = 1;
      in_vsync = (x == 0 && y == 0);
      in_hsync = (x == 0);
      #1;
      check("col", int'(col) == x);
      check("row", int'(row) == y);
      check("line_start", line_start == (x == 0));
      @(negedge clk);
      in_valid = 0; in_vsync = 0; in_hsync = 0;
      ci  = ((i - DLY) % (W * H) + W * H) % (W * H);
      ecx = ci % W;
      ecy = ci / W;
      check("cx", int'(cx) == ecx);
      check("cy", int'(cy) == ecy);
      key = 0;
      for (int r = 0; r < OM; r++)
        for (int c = 0; c < OM; c++) begin
          bit out;
          out = (ecy - HH + r < 0) || (ecy - HH + r >= H) || (ecx - HH + c < 0) || (ecx - HH + c >= W);
          check("replace", replace[r][c] == out);
          key = key * 2 + int'(out);
        end
      masks_seen[key] = 1;
    end
    // all 24 boundary cases of a 5x5 window plus the inside case
    check("boundary cases", masks_seen.num() == 25);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
