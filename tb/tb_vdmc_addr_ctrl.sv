// tb_vdmc_addr_ctrl: the address controller of a 3-frame store of 4x2 frames
// runs against a model of its FIFOs and of a memory with a five-cycle read
// latency, fed one pixel every four cycles. Checked: every address against
// independent write/read counters (level k trailing the write by k frames,
// wrapping at the end of the store), bursts of BURST equal accesses, no pop
// of an empty write FIFO, no read FIFO overfilled, no pixel left waiting for
// a read, and that bursts, skips and store wrap-arounds all happened.
module tb_vdmc_addr_ctrl;
  import rtvps_pkg::*;
  localparam int W = 4, H = 2, NF = 3, BURST = 2, DEPTH = 4;
  localparam int FRAME = W * H, TOTAL = NF * FRAME, NR = NF - 1;
  logic clk = 0, rst_n = 0;
  logic [2:0] wf_count;
  logic [2:0] rf_count [NR];
  logic rd_ret_valid;
  logic [3:0] rd_ret_level;
  logic req_valid, wf_pop, evt_burst, evt_skip, evt_wrap;
  mem_op_e req_op;
  logic [4:0] req_addr;
  logic [3:0] req_level;
  int checks = 0, failures = 0;

  vdmc_addr_ctrl #(.IMG_W(W), .IMG_H(H), .NFRAMES(NF), .BURST(BURST), .FIFO_DEPTH(DEPTH)) dut (.*);
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

  int wcnt = 0, rcnt [NR];
  int exp_w = 0, exp_r [NR];
  int ret_cyc [$], ret_lvl [$];
  int cyc = 0, pixels = 0;
  int run_len = 0, run_key = -1;
  int n_burst = 0, n_skip = 0, n_wrap = 0, n_late = 0;

  always_comb begin
    wf_count = 3'(wcnt);
    for (int k = 0; k < NR; k++) rf_count[k] = 3'(rcnt[k]);
    rd_ret_valid = (ret_cyc.size() > 0) && (ret_cyc[0] == cyc);
    rd_ret_level = rd_ret_valid ? 4'(ret_lvl[0]) : 4'd0;
  end

  initial begin
    for (int k = 0; k < NR; k++) begin
      rcnt[k] = 0;
      exp_r[k] = TOTAL - (k + 1) * FRAME;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (4000) begin
      int key, dw, dr [NR], ret_l;
      bit ret;
      @(negedge clk);
      dw = 0;
      for (int k = 0; k < NR; k++) dr[k] = 0;
      // sample the controller's outputs for this cycle
      if (evt_burst) n_burst++;
      if (evt_skip) n_skip++;
      if (evt_wrap) n_wrap++;
      key = req_valid ? (req_op == OP_WRITE ? 0 : int'(req_level)) : -1;
      if (key != run_key) begin
        if (run_key >= 0) check("burst length", run_len % BURST == 0);
        run_key = key;
        run_len = 0;
      end
      if (req_valid) run_len++;
      if (req_valid && req_op == OP_WRITE) begin
        check("write pops", wf_pop && wcnt > 0);
        check("write address", int'(req_addr) == exp_w);
        exp_w = (exp_w + 1) % TOTAL;
        dw--;
      end else begin
        check("no pop", !wf_pop);
      end
      if (req_valid && req_op == OP_READ) begin
        int l;
        l = int'(req_level) - 1;
        check("read level", l >= 0 && l < NR);
        check("read address", int'(req_addr) == exp_r[l]);
        exp_r[l] = (exp_r[l] + 1) % TOTAL;
        ret_cyc.push_back(cyc + 5);
        ret_lvl.push_back(l + 1);
      end
      ret = rd_ret_valid;
      ret_l = ret_lvl.size() > 0 ? ret_lvl[0] - 1 : 0;
      if (ret) dr[ret_l]++;
      // a pixel every four cycles, after a priming period
      if (cyc > 40 && cyc % 4 == 0) begin
        pixels++;
        if (wcnt + dw < DEPTH) dw++;
        else check("write FIFO room", 0);
        for (int k = 0; k < NR; k++) begin
          if (rcnt[k] > 0) dr[k]--;
          else n_late++;
        end
      end
      @(posedge clk);
      #1;
      cyc++;
      wcnt += dw;
      for (int k = 0; k < NR; k++) rcnt[k] += dr[k];
      if (ret) begin
        check("read FIFO room", rcnt[ret_l] <= DEPTH);
        void'(ret_cyc.pop_front());
        void'(ret_lvl.pop_front());
      end
    end
    check("no late reads", n_late == 0);
    check("bursts", n_burst > 0);
    check("skips", n_skip > 0);
    check("wraps", n_wrap >= 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
