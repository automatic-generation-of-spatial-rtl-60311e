// tb_vdmc: the video data memory controller with a 3-frame store of 4x4
// frames on the ZBT SRAM model. Six frames (preceded by pixels that come
// before the first frame start) go in at one pixel every four cycles, the
// rate the memory sustains for one write and two reads per pixel: every
// stored-level pixel must equal the pixel at the same position one or two
// frames earlier, the level-valid flags must rise frame by frame, and no
// underrun or overrun may occur. A second controller is then fed one pixel
// every other cycle, faster than its memory, and must flag the underrun; it
// must also have ignored a frame start that came before its read FIFOs
// were primed.
module tb_vdmc;
  import rtvps_pkg::*;
  localparam int W = 4, H = 4, NF = 3, PW = 8, MW = 36, BURST = 4, DEPTH = 8;
  localparam int NR = NF - 1, AW = $clog2(NF * W * H);
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
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
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [PW-1:0] pv(int f, int i);
    return PW'(f * 37 + i * 3 + 1);
  endfunction

  logic in_valid [2], in_vsync [2];
  logic [PW-1:0] in_pix [2];
  logic taken [2], underrun [2], overrun [2], eb [2], es [2], ew [2];
  logic [PW-1:0] lvl_pix [2][NR];
  logic lvl_ok [2][NR];
  logic [AW-1:0] sa [2];
  logic cen [2], wen [2], oe [2];
  logic [MW-1:0] dqo [2], dqi [2];
  int conflict [2];

  for (genvar u = 0; u < 2; u++) begin : g_u
    vdmc #(.IMG_W(W), .IMG_H(H), .NFRAMES(NF), .PIX_W(PW), .MEM_W(MW), .BURST(BURST),
           .FIFO_DEPTH(DEPTH)) dut (
      .clk, .rst_n, .in_valid(in_valid[u]), .in_vsync(in_vsync[u]), .in_pix(in_pix[u]),
      .taken(taken[u]), .lvl_pix(lvl_pix[u]), .lvl_ok(lvl_ok[u]), .underrun(underrun[u]),
      .overrun(overrun[u]), .evt_burst(eb[u]), .evt_skip(es[u]), .evt_wrap(ew[u]),
      .sram_addr(sa[u]), .sram_cen_n(cen[u]), .sram_we_n(wen[u]), .sram_dq_o(dqo[u]),
      .sram_dq_oe(oe[u]), .sram_dq_i(dqi[u]));
    zbt_sram_model #(.ADDR_W(AW), .DATA_W(MW)) mem (
      .clk, .addr(sa[u]), .cen_n(cen[u]), .we_n(wen[u]), .dq_i(dqo[u]), .dq_oe(oe[u]),
      .dq_o(dqi[u]), .bus_conflict(conflict[u]));
  end

  int n_wrap = 0, conflict0;
  always @(posedge clk) if (ew[0]) n_wrap++;

  initial begin
    for (int u = 0; u < 2; u++) begin
      in_valid[u] = 0; in_vsync[u] = 0; in_pix[u] = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // a frame start right after reset, before the read FIFOs are primed,
    // must not be taken
    in_valid[1] = 1; in_vsync[1] = 1;
    #1 check("unprimed frame start ignored", !taken[1]);
    @(negedge clk);
    in_valid[1] = 0; in_vsync[1] = 0;
    repeat (200) @(negedge clk);
    conflict0 = conflict[0];  // pin states before the first clock do not count
    // unit 0 at the sustainable rate, with two pixels before the first frame
    for (int n = -2; n < 6 * W * H; n++) begin
      int f, i;
      f = n / (W * H);
      i = n % (W * H);
      in_valid[0] = 1;
      in_vsync[0] = (n >= 0) && (i == 0);
      in_pix[0]   = (n >= 0) ? pv(f, i) : 8'hFF;
      #1;
      check("taken", taken[0] == (n >= 0));
      if (n >= 0)
        for (int k = 0; k < NR; k++) begin
          check("level ok", lvl_ok[0][k] == (f >= k + 1));
          if (f >= k + 1) check("level pixel", lvl_pix[0][k] == pv(f - k - 1, i));
        end
      @(negedge clk);
      in_valid[0] = 0; in_vsync[0] = 0;
      repeat (NF) @(negedge clk);
    end
    check("no underrun", !underrun[0]);
    check("no overrun", !overrun[0]);
    check("no bus conflict", conflict[0] == conflict0);
    check("store wrapped", n_wrap >= 1);
    // unit 1 too fast for its memory
    for (int n = 0; n < 3 * W * H; n++) begin
      in_valid[1] = 1;
      in_vsync[1] = (n % (W * H)) == 0;
      in_pix[1]   = pv(n / (W * H), n % (W * H));
      @(negedge clk);
      in_valid[1] = 0; in_vsync[1] = 0;
      @(negedge clk);
    end
    check("underrun flagged", underrun[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
