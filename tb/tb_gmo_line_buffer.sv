// tb_gmo_line_buffer: streams a raster image through two GMO configurations
// (2 lines of 48 bits, split 32+16; 4 lines of 40 bits, split 32+8) and
// checks that after every pixel lines[d] returns the pixel d+1 lines above.
module tb_gmo_line_buffer;
  localparam int DEPTH = 10;
  logic clk = 0, en;
  logic [3:0] addr;
  logic       slot_a;
  logic [1:0] slot_b;
  logic [47:0] wd_a;
  logic [39:0] wd_b;
  logic [47:0] lines_a [2];
  logic [39:0] lines_b [4];
  int checks = 0, failures = 0;

  gmo_line_buffer #(.DEPTH(DEPTH), .NL(2), .LINE_W(48)) dut_a (
    .clk, .en, .addr, .slot(slot_a), .wdata(wd_a), .lines(lines_a));
  gmo_line_buffer #(.DEPTH(DEPTH), .NL(4), .LINE_W(40)) dut_b (
    .clk, .en, .addr, .slot(slot_b), .wdata(wd_b), .lines(lines_b));

  always #5 clk = ~clk;

  function automatic logic [47:0] pv(int x, int y);
    return {16'(x * 3 + 1), 16'(y * 7 + 11), 16'((x ^ y) * 29 + 13)};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; addr = 0; slot_a = 0; slot_b = 0; wd_a = 0; wd_b = 0;
    for (int y = 0; y < 12; y++) begin
      for (int x = 0; x < DEPTH; x++) begin
        // idle cycles between some pixels
        while (($urandom % 3) == 0) begin
          @(negedge clk);
          en = 0;
        end
        @(negedge clk);
        en = 1; addr = 4'(x); slot_a = 1'(y % 2); slot_b = 2'(y % 4);
        wd_a = pv(x, y); wd_b = pv(x, y)[39:0];
        @(negedge clk);
        en = 0;
        for (int d = 0; d < 2; d++) if (y - d - 1 >= 0) begin
          checks++;
          if (lines_a[d] !== pv(x, y - d - 1)) begin
            failures++;
            $display("A x=%0d y=%0d d=%0d got %h exp %h", x, y, d, lines_a[d], pv(x, y - d - 1));
          end
        end
        for (int d = 0; d < 4; d++) if (y - d - 1 >= 0) begin
          checks++;
          if (lines_b[d] !== pv(x, y - d - 1)[39:0]) begin
            failures++;
            $display("B x=%0d y=%0d d=%0d got %h", x, y, d, lines_b[d]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
