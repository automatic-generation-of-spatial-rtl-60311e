// tb_output_sync: a stream with pixels before the first frame start and idle
// cycles goes through the sync delay of a 3x3 window on 6-pixel lines
// (delay 7 pixels). Every output cycle is checked, three cycles after its
// pixel, against a reference built from the recorded input marks.
module tb_output_sync;
  localparam int W = 6, H = 4, DLY = 7;
  logic clk = 0, rst_n = 0, in_valid = 0, in_vsync = 0, in_hsync = 0;
  logic out_valid, out_vsync, out_hsync;
  int checks = 0, failures = 0;
  bit vs_q [$], hs_q [$];
  bit exp_v [$], exp_vs [$], exp_hs [$];
  int n_vsync_out = 0;

  output_sync #(.IMG_W(W), .OMEGA(3)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected output of each cycle, three cycles later
  bit pipe_v [3], pipe_vs [3], pipe_hs [3];
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (out_valid !== pipe_v[2] || (pipe_v[2] && (out_vsync !== pipe_vs[2] || out_hsync !== pipe_hs[2]))) begin
      failures++;
      $display("FAIL at %0t: got v=%b vs=%b hs=%b exp v=%b vs=%b hs=%b", $time,
               out_valid, out_vsync, out_hsync, pipe_v[2], pipe_vs[2], pipe_hs[2]);
    end
    if (out_valid && out_vsync) n_vsync_out++;
  end

  int started_at = -1;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3 + 3 * W * H; i++) begin
      int p, n;
      bit ev, evs, ehs;
      while (($urandom % 3) == 0) begin
        @(posedge clk); #1;
        pipe_v[2] = pipe_v[1]; pipe_vs[2] = pipe_vs[1]; pipe_hs[2] = pipe_hs[1];
        pipe_v[1] = pipe_v[0]; pipe_vs[1] = pipe_vs[0]; pipe_hs[1] = pipe_hs[0];
        pipe_v[0] = 0;
        in_valid = 0; in_vsync = 0; in_hsync = 0;
      end
      // three junk pixels, then frames
      p = i - 3;
      in_valid = 1;
      in_vsync = (p >= 0) && (p % (W * H) == 0);
      in_hsync = (p >= 0) && (p % W == 0);
      if (in_vsync && started_at < 0) started_at = i;
      vs_q.push_back(in_vsync);
      hs_q.push_back(in_hsync);
      n = i - DLY;
      ev  = (n >= 0) && (started_at >= 0) && (n >= started_at);
      evs = ev && vs_q[n];
      ehs = ev && (hs_q[n] || vs_q[n]);
      @(posedge clk); #1;
      pipe_v[2] = pipe_v[1]; pipe_vs[2] = pipe_vs[1]; pipe_hs[2] = pipe_hs[1];
      pipe_v[1] = pipe_v[0]; pipe_vs[1] = pipe_vs[0]; pipe_hs[1] = pipe_hs[0];
      pipe_v[0] = ev; pipe_vs[0] = evs; pipe_hs[0] = ehs;
      in_valid = 0; in_vsync = 0; in_hsync = 0;
    end
    repeat (5) begin
      @(posedge clk); #1;
      pipe_v[2] = pipe_v[1]; pipe_vs[2] = pipe_vs[1]; pipe_hs[2] = pipe_hs[1];
      pipe_v[1] = pipe_v[0]; pipe_vs[1] = pipe_vs[0]; pipe_hs[1] = pipe_hs[0];
      pipe_v[0] = 0;
    end
    checks++;
    if (n_vsync_out != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
