// Self-checking test of block_controller. The testbench stands in for the
// rest of the datapath: a sample memory, a coefficient memory (both with one
// cycle read latency), the data registers and the accumulators are modelled
// here, driven only by the controller's outputs. At each out_start the model
// accumulators must equal the filter outputs y(m)..y(m+L-1) computed directly
// from the convolution sum. Per block it also checks N coefficient reads,
// N-1+L sample reads, N*L products, one coefficient-register load per
// coefficient, and a period of N*L + 2L + 4 cycles when the output side
// answers at once. Runs the scheme's worked N=6, L=3 example, N=32 with
// L=2,4,8,16, N=89 with L=16, and small corner cases (L=1, N<L).
module tb_block_controller;
  import block_fir_pkg::*;
  localparam int MAXB = 16, MAXT = 128, DEPTH = 256, W = 16, CW = 32;
  localparam int NSAMP = 400;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] num_taps = 1;
  logic [4:0] block_len = 1;
  logic init_done = 0;
  logic [CW-1:0] wr_count = 0, keep_from;
  logic dmem_re, cmem_re, rf_we, mac_clr, mac_issue, mac_coef_load, out_start, block_done;
  logic [7:0] dmem_raddr;
  logic [6:0] cmem_raddr;
  logic [3:0] rf_waddr, rf_raddr, mac_acc_idx;
  logic [4:0] out_len;
  logic mac_busy = 0, out_done = 0;
  ctrl_state_e state;

  block_controller #(.MAX_BLOCK(MAXB), .MAX_TAPS(MAXT), .DMEM_DEPTH(DEPTH), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  // ---- models of the surrounding datapath ----
  longint xs [NSAMP];
  longint h [MAXT];
  longint dmem [DEPTH];
  longint dm_rdata, cm_rdata, coef_reg;
  longint rf [MAXB];
  longint acc [MAXB];
  int n_coef_rd, n_data_rd, n_mul, n_load;

  function automatic longint xv(input longint s);
    return (s < 0) ? 0 : xs[s];
  endfunction

  always @(posedge clk) begin
    longint rd;
    if (rst_n) begin
      // register file read with bypass, using values before this edge
      rd = (rf_we && rf_waddr == rf_raddr) ? dm_rdata : rf[rf_raddr];
      if (mac_issue) begin
        if (mac_coef_load) begin coef_reg = cm_rdata; n_load++; end
        acc[mac_acc_idx] += coef_reg * rd;
        n_mul++;
      end
      if (mac_clr) foreach (acc[j]) acc[j] = 0;
      if (rf_we) rf[rf_waddr] = dm_rdata;
      if (dmem_re) begin dm_rdata = dmem[dmem_raddr]; n_data_rd++; end
      if (cmem_re) begin cm_rdata = h[cmem_raddr]; n_coef_rd++; end
    end
  end

  // mac_busy: a product issued in the previous cycle is still in flight
  always @(posedge clk) mac_busy <= rst_n && mac_issue;

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_config(input int n, input int l, input int nblocks);
    int m, t_start, prev_start;
    rst_n = 0;
    init_done = 0;
    wr_count = 0;
    num_taps = 8'(n);
    block_len = 5'(l);
    foreach (dmem[a]) dmem[a] = 0;
    foreach (xs[s]) xs[s] = longint'($signed(W'($urandom)));
    for (int k = 0; k < MAXT; k++) h[k] = longint'($signed(W'($urandom)));
    foreach (rf[r]) rf[r] = 0;
    coef_reg = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    init_done = 1;
    m = 0;
    prev_start = -1;
    for (int b = 0; b < nblocks; b++) begin
      int cyc;
      bit quick, prev_quick;
      prev_quick = (b % 2) == 1;
      quick = (b % 2) == 0;
      // deliver samples up to the end of this block
      while (int'(wr_count) < m + l) begin
        dmem[int'(wr_count) % DEPTH] = xs[wr_count];
        wr_count++;
      end
      #1;
      n_coef_rd = 0; n_data_rd = 0; n_mul = 0; n_load = 0;
      // wait for the block to start
      cyc = 0;
      while (!(state == ST_IDLE && dut.avail >= CW'(l))) begin @(negedge clk); #1; cyc++; end
      t_start = $time / 10;
      if (prev_start >= 0 && prev_quick) begin
        checks++;
        if (t_start - prev_start != n * l + 2 * l + 4)
          fail($sformatf("N=%0d L=%0d period %0d", n, l, t_start - prev_start));
      end
      prev_start = t_start;
      // run until the controller hands over to the output unit
      while (!out_start) begin @(negedge clk); #1; end
      checks++;
      if (($time / 10) - t_start != 1 + l + n * l + 1)
        fail($sformatf("N=%0d L=%0d out_start after %0d", n, l, ($time / 10) - t_start));
      @(negedge clk);   // the last product has landed
      for (int j = 0; j < l; j++) begin
        longint y;
        y = 0;
        for (int k = 0; k < n; k++) y += h[k] * xv(m + j - k);
        checks++;
        if (acc[j] != y) fail($sformatf("N=%0d L=%0d y(%0d) got %0d exp %0d", n, l, m + j, acc[j], y));
      end
      checks++;
      if (n_coef_rd != n) fail($sformatf("coefficient reads %0d", n_coef_rd));
      checks++;
      if (n_data_rd != n - 1 + l) fail($sformatf("sample reads %0d", n_data_rd));
      checks++;
      if (n_mul != n * l) fail($sformatf("products %0d", n_mul));
      checks++;
      if (n_load != n) fail($sformatf("coefficient loads %0d", n_load));
      checks++;
      if (out_len != 5'(l)) fail("out_len");
      // output unit: done L+1 cycles after start, or later with back-pressure
      repeat (quick ? l : l + 5 + ($urandom % 7)) @(negedge clk);
      out_done = 1;
      #1;
      checks++;
      if (!block_done) fail("block_done");
      @(negedge clk);
      out_done = 0;
      m += l;
    end
  endtask

  initial begin
    run_config(6, 3, 8);
    run_config(32, 2, 10);
    run_config(32, 4, 10);
    run_config(32, 8, 10);
    run_config(32, 16, 10);
    run_config(89, 16, 10);
    run_config(89, 2, 10);
    run_config(1, 1, 10);
    run_config(5, 1, 10);
    run_config(3, 8, 10);
    run_config(128, 16, 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
