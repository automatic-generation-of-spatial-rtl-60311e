// tb_boundary_pixel_switch: random 3x3 windows and masks in both replacement
// modes; checks the registered output and its one-cycle valid.
module tb_boundary_pixel_switch;
  import rtvps_pkg::*;
  localparam int OM = 3, PW = 10;
  logic clk = 0, rst_n = 0, in_valid, out_valid;
  logic [PW-1:0] in_win [OM][OM], out_win [OM][OM], exp_win [OM][OM];
  logic replace [OM][OM];
  bnd_mode_e bnd_mode;
  logic [PW-1:0] bnd_const;
  int checks = 0, failures = 0;
  int n_centre = 0, n_const = 0;

  boundary_pixel_switch #(.OMEGA(OM), .PIX_W(PW)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; bnd_mode = BND_CENTRE; bnd_const = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      in_valid  = 1;
      bnd_mode  = bnd_mode_e'($urandom % 2);
      bnd_const = PW'($urandom);
      for (int r = 0; r < OM; r++)
        for (int c = 0; c < OM; c++) begin
          in_win[r][c]  = PW'($urandom);
          replace[r][c] = (r != 1 || c != 1) && ($urandom % 3 == 0);
        end
      for (int r = 0; r < OM; r++)
        for (int c = 0; c < OM; c++)
          exp_win[r][c] = !replace[r][c] ? in_win[r][c] :
                          (bnd_mode == BND_CONST) ? bnd_const : in_win[1][1];
      if (bnd_mode == BND_CONST) n_const++; else n_centre++;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid) failures++;
      for (int r = 0; r < OM; r++)
        for (int c = 0; c < OM; c++) begin
          checks++;
          if (out_win[r][c] !== exp_win[r][c]) begin
            failures++;
            $display("n=%0d r=%0d c=%0d got %h exp %h", n, r, c, out_win[r][c], exp_win[r][c]);
          end
        end
      @(negedge clk);
      checks++;
      if (out_valid) failures++;
    end
    checks++;
    if (n_const == 0 || n_centre == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
