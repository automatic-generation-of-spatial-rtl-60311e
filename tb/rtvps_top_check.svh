// Shared body of the end-to-end testbenches of rtvps_top. The including
// module defines W, H, OM, NF, PW, MW, NFRAMES_IN, PERIOD and instantiates
// the design as `dut` with the signals declared here.
//
// Stimulus: two pixels before the first frame start, then NFRAMES_IN frames
// and two flush lines, one pixel every PERIOD cycles plus random idle cycles;
// the replacement mode alternates frame by frame and the constant changes.
// Every output window is compared with windows cut from the known frames
// (pixel value pv(frame, x, y)), with the taps outside the image replaced as
// selected; the level-valid flags, the output sync marks, the centre position
// and the four-cycle latency are checked too. The mechanisms of the design
// are counted and each must have happened: replacement by the centre and by
// the constant, write and read bursts, skipped table entries, wrap-around of
// the frame store, windows with every temporal level valid.

  localparam int HH    = (OM - 1) / 2;
  localparam int FRAME = W * H;
  localparam int NR    = NF - 1;
  localparam int AW    = $clog2(NF * W * H);

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid = 0, in_vsync = 0, in_hsync = 0;
  logic [PW-1:0] in_pix = '0;
  bnd_mode_e bnd_mode = BND_CENTRE;
  logic [PW-1:0] bnd_const = '0;
  logic out_valid, out_vsync, out_hsync, underrun, overrun;
  logic [PW-1:0] out_win [NF][OM][OM];
  logic out_lvl_ok [NF];
  logic [$clog2(W)-1:0] out_cx;
  logic [$clog2(H)-1:0] out_cy;
  logic [AW-1:0] sram_addr;
  logic sram_cen_n, sram_we_n, sram_dq_oe;
  logic [MW-1:0] sram_dq_o, sram_dq_i;
  int bus_conflict, conflict0;

  zbt_sram_model #(.ADDR_W(AW), .DATA_W(MW), .WORDS(NF * W * H)) u_mem (
    .clk, .addr(sram_addr), .cen_n(sram_cen_n), .we_n(sram_we_n), .dq_i(sram_dq_o),
    .dq_oe(sram_dq_oe), .dq_o(sram_dq_i), .bus_conflict);

  function automatic logic [PW-1:0] pv(int f, int x, int y);
    return PW'(f * 1009 + y * 37 + x * 11 + 5);
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---- output checking ----------------------------------------------------
  bnd_mode_e     mode_q;
  logic [PW-1:0] const_q;
  logic [4:0]    taken_hist;
  always_ff @(posedge clk) begin
    mode_q     <= bnd_mode;
    const_q    <= bnd_const;
    taken_hist <= {taken_hist[3:0], dut.g_temporal.u_vdmc.taken};
  end

  int nout = 0;
  int n_rep_centre = 0, n_rep_const = 0, n_all_levels = 0;
  int n_burst_w = 0, n_burst_r = 0, n_skip = 0, n_wrap = 0;

  always @(negedge clk) if (rst_n) begin
    if (dut.g_temporal.u_vdmc.evt_burst && dut.g_temporal.u_vdmc.req_op == OP_WRITE) n_burst_w++;
    if (dut.g_temporal.u_vdmc.evt_burst && dut.g_temporal.u_vdmc.req_op == OP_READ) n_burst_r++;
    if (dut.g_temporal.u_vdmc.evt_skip) n_skip++;
    if (dut.g_temporal.u_vdmc.evt_wrap) n_wrap++;
    if (out_valid) begin
      int f, cx, cy;
      bit all_ok;
      f  = nout / FRAME;
      cx = (nout % FRAME) % W;
      cy = (nout % FRAME) / W;
      check("latency", taken_hist[3]);
      check("centre", int'(out_cx) == cx && int'(out_cy) == cy);
      check("vsync", out_vsync == (cx == 0 && cy == 0));
      check("hsync", out_hsync == (cx == 0));
      all_ok = 1;
      for (int k = 0; k < NF; k++) begin
        check("level ok", out_lvl_ok[k] == (f >= k));
        if (f < k) all_ok = 0;
        else
          for (int r = 0; r < OM; r++)
            for (int c = 0; c < OM; c++) begin
              int x, y;
              logic [PW-1:0] e;
              x = cx - HH + c;
              y = cy - HH + r;
              if (x >= 0 && x < W && y >= 0 && y < H) e = pv(f - k, x, y);
              else if (mode_q == BND_CONST) begin
                e = const_q;
                n_rep_const++;
              end else begin
                e = pv(f - k, cx, cy);
                n_rep_centre++;
              end
              check("window", out_win[k][r][c] == e);
            end
      end
      if (all_ok) n_all_levels++;
      nout++;
    end
  end

  // ---- stimulus -------------------------------------------------------------
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (200) @(negedge clk);
    conflict0 = bus_conflict;  // pin states before the first clock do not count
    for (int n = -2; n < NFRAMES_IN * FRAME + HH * W + HH + 1; n++) begin
      int f, x, y;
      f = n / FRAME;
      x = (n % FRAME) % W;
      y = (n % FRAME) / W;
      in_valid = 1;
      in_vsync = (n >= 0) && x == 0 && y == 0;
      in_hsync = (n >= 0) && x == 0;
      in_pix   = (n >= 0) ? pv(f, x, y) : '1;
      if (n >= 0 && x == 0 && y == 0) begin
        bnd_mode  = bnd_mode_e'(f % 2);
        bnd_const = PW'(f * 7 + 200);
      end
      @(negedge clk);
      in_valid = 0; in_vsync = 0; in_hsync = 0;
      repeat (PERIOD - 1) @(negedge clk);
      if (($urandom % 16) == 0) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    check("all windows out", nout == NFRAMES_IN * FRAME + 1);
    check("no underrun", !underrun);
    check("no overrun", !overrun);
    check("no bus conflict", bus_conflict == conflict0);
    check("replaced by centre", n_rep_centre > 0);
    check("replaced by constant", n_rep_const > 0);
    check("write bursts", n_burst_w > 0);
    check("read bursts", n_burst_r > 0);
    check("table entries skipped", n_skip > 0);
    check("all temporal levels", n_all_levels > 0 || NFRAMES_IN < NF);
    check("frame store wrapped", n_wrap > 0 || NFRAMES_IN < NF);
    $display("windows %0d, centre/constant replacements %0d/%0d, bursts w/r %0d/%0d, skips %0d, wraps %0d, all-level windows %0d",
             nout, n_rep_centre, n_rep_const, n_burst_w, n_burst_r, n_skip, n_wrap, n_all_levels);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
