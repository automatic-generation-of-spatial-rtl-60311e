// tb_rtvps_sweep: the configurations of the spatial/temporal sweep, 3x3, 5x5
// and 7x7 windows each on 1, 3, 5, 7 and 9-frame temporal neighbourhoods,
// run side by side on 16x8 frames of 24-bit pixels (the full 1367x768 size is
// exercised by tb_rtvps_top_full for the main configuration).
module tb_rtvps_sweep;
  localparam int NCFG = 15;
  logic clk = 0, rst_n = 0;
  int c_checks [NCFG], c_fail [NCFG];
  bit c_done [NCFG];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < 3; i++) begin : g_om
    for (genvar j = 0; j < 5; j++) begin : g_nf
      rtvps_sweep_env #(.W(16), .H(8), .OM(3 + 2 * i), .NF(1 + 2 * j)) env (
        .clk, .rst_n, .checks(c_checks[i*5+j]), .failures(c_fail[i*5+j]), .done(c_done[i*5+j]));
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    bit all;
    repeat (3) @(negedge clk);
    rst_n = 1;
    do begin
      @(negedge clk);
      all = 1;
      for (int i = 0; i < NCFG; i++) all &= c_done[i];
    end while (!all);
    for (int i = 0; i < NCFG; i++) begin
      $display("window %0dx%0d, %0d frames: checks %0d failures %0d",
               3 + 2 * (i / 5), 3 + 2 * (i / 5), 1 + 2 * (i % 5), c_checks[i], c_fail[i]);
      checks += c_checks[i];
      failures += c_fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
