// rtvps_sweep_env: one configuration of the spatial/temporal sweep. It runs
// rtvps_top with an omega x omega window and NF frames on W x H frames of
// 24-bit pixels and a ZBT SRAM model, streams NF+1 frames (one pixel every
// NF+1 cycles) and checks every window of every temporal level against the
// known frames with centre replacement at the image border. Results are
// returned through checks/failures; done rises when the run is over.
module rtvps_sweep_env
  import rtvps_pkg::*;
#(
  parameter int W  = 16,
  parameter int H  = 8,
  parameter int OM = 3,
  parameter int NF = 3
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   done
);
  localparam int PW = 24, MW = 36, HH = (OM - 1) / 2, FRAME = W * H;
  localparam int AW = $clog2(NF * W * H);

  logic in_valid, in_vsync, in_hsync;
  logic [PW-1:0] in_pix;
  logic out_valid, out_vsync, out_hsync, underrun, overrun;
  logic [PW-1:0] out_win [NF][OM][OM];
  logic out_lvl_ok [NF];
  logic [$clog2(W)-1:0] out_cx;
  logic [$clog2(H)-1:0] out_cy;
  logic [AW-1:0] sram_addr;
  logic sram_cen_n, sram_we_n, sram_dq_oe;
  logic [MW-1:0] sram_dq_o, sram_dq_i;
  int bus_conflict;

  rtvps_top #(.IMG_W(W), .IMG_H(H), .OMEGA(OM), .PIX_W(PW), .NFRAMES(NF), .MEM_W(MW),
              .BURST(8), .FIFO_DEPTH(32)) dut (
    .clk, .rst_n, .in_valid, .in_vsync, .in_hsync, .in_pix, .bnd_mode(BND_CENTRE),
    .bnd_const('0), .out_valid, .out_vsync, .out_hsync, .out_win, .out_lvl_ok, .out_cx,
    .out_cy, .underrun, .overrun, .sram_addr, .sram_cen_n, .sram_we_n, .sram_dq_o,
    .sram_dq_oe, .sram_dq_i);

  zbt_sram_model #(.ADDR_W(AW), .DATA_W(MW), .WORDS(NF * W * H)) u_mem (
    .clk, .addr(sram_addr), .cen_n(sram_cen_n), .we_n(sram_we_n), .dq_i(sram_dq_o),
    .dq_oe(sram_dq_oe), .dq_o(sram_dq_i), .bus_conflict);

  function automatic logic [PW-1:0] pv(int f, int x, int y);
    return PW'(f * 65537 + y * 257 + x * 3 + 1);
  endfunction

  int nout = 0;
  always @(negedge clk) if (rst_n && out_valid) begin
    int f, cx, cy;
    f  = nout / FRAME;
    cx = (nout % FRAME) % W;
    cy = (nout % FRAME) / W;
    for (int k = 0; k < NF; k++) begin
      checks++;
      if (out_lvl_ok[k] != (f >= k)) failures++;
      if (f >= k)
        for (int r = 0; r < OM; r++)
          for (int c = 0; c < OM; c++) begin
            int x, y;
            logic [PW-1:0] e;
            x = cx - HH + c;
            y = cy - HH + r;
            e = (x >= 0 && x < W && y >= 0 && y < H) ? pv(f - k, x, y) : pv(f - k, cx, cy);
            checks++;
            if (out_win[k][r][c] != e) failures++;
          end
    end
    nout++;
  end

  initial begin
    checks = 0; failures = 0; done = 0;
    in_valid = 0; in_vsync = 0; in_hsync = 0; in_pix = '0;
    wait (rst_n);
    repeat (200) @(negedge clk);
    for (int n = 0; n < (NF + 1) * FRAME + HH * W + HH + 1; n++) begin
      in_valid = 1;
      in_vsync = (n % FRAME) == 0;
      in_hsync = (n % W) == 0;
      in_pix   = pv(n / FRAME, (n % FRAME) % W, (n % FRAME) / W);
      @(negedge clk);
      in_valid = 0; in_vsync = 0; in_hsync = 0;
      repeat (NF) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks += 2;
    if (nout != (NF + 1) * FRAME + 1) failures++;
    if (underrun || overrun) failures++;
    done = 1;
  end
endmodule
