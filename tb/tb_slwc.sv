// tb_slwc: three frames of an 8x6 image on two temporal levels through a
// 3x3 sliding window controller and two frames through a 5x5 one, with idle
// cycles and the replacement mode switched every frame. Every output window
// is compared with windows cut from the known frames, taps outside the image
// replaced by the centre pixel or the constant; the three-cycle latency and
// the centre position are checked as well.
module tb_slwc;
  import rtvps_pkg::*;
  localparam int W = 8, H = 6, PW = 8, NL = 2;
  int checks = 0, failures = 0;
  int n_rep_centre = 0, n_rep_const = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [PW-1:0] pv(int lev, int f, int x, int y);
    return PW'((f - lev) * 61 + y * 17 + x * 5 + 3 + lev * 100);
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // common stimulus
  logic in_valid = 0, in_vsync = 0, in_hsync = 0;
  logic [PW-1:0] in_pix [NL];
  bnd_mode_e bnd_mode = BND_CENTRE;
  logic [PW-1:0] bnd_const = 8'hEE;
  logic [3:0] vhist;  // in_valid history for the latency check

  logic ov3, ov5;
  logic [PW-1:0] win3 [NL][3][3];
  logic [PW-1:0] win5 [NL][5][5];
  logic [2:0] cx3, cy3, cx5, cy5;
  bit run5;

  slwc #(.IMG_W(W), .IMG_H(H), .OMEGA(3), .PIX_W(PW), .NLEV(NL)) dut3 (
    .clk, .rst_n, .in_valid(in_valid && !run5), .in_vsync, .in_hsync, .in_pix, .bnd_mode, .bnd_const,
    .out_valid(ov3), .out_win(win3), .out_cx(cx3), .out_cy(cy3));
  slwc #(.IMG_W(W), .IMG_H(H), .OMEGA(5), .PIX_W(PW), .NLEV(NL)) dut5 (
    .clk, .rst_n, .in_valid(in_valid && run5), .in_vsync, .in_hsync, .in_pix, .bnd_mode, .bnd_const,
    .out_valid(ov5), .out_win(win5), .out_cx(cx5), .out_cy(cy5));

  always_ff @(posedge clk) vhist <= {vhist[2:0], in_valid};

  // the mode the switch saw when it loaded each output
  int nout3 = 0, nout5 = 0;
  bnd_mode_e mode_q;
  always_ff @(posedge clk) mode_q <= bnd_mode;

  task automatic check_win(int om, int j, int ocx, int ocy);
    int hh, dly, ci, f, cx, cy;
    hh  = (om - 1) / 2;
    dly = hh * W + hh;
    ci  = j - dly;
    if (ci < 0) return;
    f  = ci / (W * H);
    cx = (ci % (W * H)) % W;
    cy = (ci % (W * H)) / W;
    check("cx", ocx == cx);
    check("cy", ocy == cy);
    for (int k = 0; k < NL; k++)
      for (int r = 0; r < om; r++)
        for (int c = 0; c < om; c++) begin
          int x, y;
          logic [PW-1:0] e, g;
          x = cx - hh + c;
          y = cy - hh + r;
          if (x >= 0 && x < W && y >= 0 && y < H) e = pv(k, f, x, y);
          else if (mode_q == BND_CONST) begin
            e = bnd_const;
            n_rep_const++;
          end else begin
            e = pv(k, f, cx, cy);
            n_rep_centre++;
          end
          g = (om == 3) ? win3[k][r][c] : win5[k][r][c];
          check("window", g == e);
        end
  endtask

  always @(negedge clk) if (rst_n) begin
    if (ov3 || ov5) check("latency", vhist[2] == 1'b1);
    if (ov3) begin
      check_win(3, nout3, int'(cx3), int'(cy3));
      nout3++;
    end
    if (ov5) begin
      check_win(5, nout5, int'(cx5), int'(cy5));
      nout5++;
    end
  end

  initial begin
    in_pix = '{default: '0};
    run5 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      int nfr;
      nfr = pass == 0 ? 3 : 2;
      @(negedge clk);
      run5 = (pass == 1);
      for (int i = 0; i < nfr * W * H + 3 * W; i++) begin
        int f, x, y;
        f = i / (W * H);
        x = (i % (W * H)) % W;
        y = (i % (W * H)) / W;
        while (($urandom % 3) == 0) begin
          @(negedge clk);
          in_valid = 0; in_vsync = 0; in_hsync = 0;
        end
        @(negedge clk);
        bnd_mode = bnd_mode_e'(f % 2);
        in_valid = 1;
        in_vsync = (x == 0 && y == 0);
        in_hsync = (x == 0);
        for (int k = 0; k < NL; k++) in_pix[k] = pv(k, f, x, y);
      end
      @(negedge clk);
      in_valid = 0; in_vsync = 0; in_hsync = 0;
      repeat (6) @(negedge clk);
    end
    check("outputs 3x3", nout3 == 3 * W * H + 3 * W);
    check("outputs 5x5", nout5 == 2 * W * H + 3 * W);
    check("centre replacements", n_rep_centre > 0);
    check("constant replacements", n_rep_const > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
