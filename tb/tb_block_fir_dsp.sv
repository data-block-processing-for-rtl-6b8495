// End-to-end test of block_fir_dsp at its default parameters (16-bit data,
// up to 16-sample blocks, up to 128 taps, 256-word sample memory).
//
// For each configuration the core is reset, N and L are set, a coefficient
// set is loaded (a Hamming-windowed lowpass or bandpass, or random values)
// and a stream of uniformly distributed random 16-bit samples is pushed in.
// Every output is compared with the convolution sum computed here, samples
// before the first one counting as zero, and out_last must close every block
// of L. Memory traffic is counted on the controller's read strobes and must
// be N coefficient reads and N-1+L sample reads per block (equations (1) and
// (2) of the scheme); the multiplier's coefficient operand may be loaded only
// once per coefficient, i.e. once every L products. For N = 32 the resulting
// reductions against one read of each memory per product are compared with
// the published figures (48.43/72.65/84.76/90.82 % for samples and
// 50/75/87.5/93.75 % for coefficients at L = 2/4/8/16). With input always
// offered and output always accepted, a block must take N*L + 2L + 4 cycles.
// The switching of the multiplier's operand registers, of the nets inside the
// gate-level multiplier and of the two memory address buses is compared with
// a run at L = 1 (one product per fetched coefficient, the conventional
// order); every block size must lower it, the multiplier must gain most at
// L = 2, and from L = 4 on its gain must grow with L.
//
// Mechanisms that must each occur at least once: the memory clear after
// reset, input back-pressure, output back-pressure, the register-file bypass
// (L = 1), a change of N and L between runs, and coefficient reuse.
module tb_block_fir_dsp;
  localparam int W = 16, MAXB = 16, MAXT = 128, ACC_W = 2 * W + 7;
  localparam real PI = 3.14159265358979;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] num_taps = 1;
  logic [4:0] block_len = 1;
  logic coef_we = 0;
  logic [6:0] coef_waddr = 0;
  logic [W-1:0] coef_wdata = 0, in_data = 0;
  logic in_valid = 0, in_ready, out_valid, out_last, out_ready = 1, init_done;
  logic [ACC_W-1:0] out_data;

  block_fir_dsp dut (.*);

  always #5 clk = ~clk;

  // event counters
  int n_clear_runs = 0, n_in_stall = 0, n_out_stall = 0, n_bypass = 0;
  int n_mode_switch = 0, n_coef_reuse = 0;
  int n_dm_rd, n_cm_rd, n_mul, n_coef_load, n_coef_toggle_bits, n_data_toggle_bits;
  logic [W-1:0] last_coef_op, last_data_op;
  // switching inside the multiplier: every partial-product bit, every
  // full-adder sum and carry of the array, and the product (zero-delay
  // values sampled once per cycle)
  longint n_net_toggles;
  logic [2*W-1:0] snap_pp [W];
  logic [2*W-1:0] snap_s  [W+1];
  logic [2*W-1:0] snap_c  [W+1];
  logic [2*W-1:0] snap_p;
  // address-bus switching of the two memories, counted between reads
  int n_dm_addr_toggles, n_cm_addr_toggles;
  logic [7:0] last_dm_addr;
  logic [6:0] last_cm_addr;

  always @(posedge clk) begin
    if (rst_n && init_done) begin
      for (int r = 0; r < W; r++) n_net_toggles += $countones(dut.u_mac.u_mul.pp[r] ^ snap_pp[r]);
      for (int r = 0; r <= W; r++) begin
        n_net_toggles += $countones(dut.u_mac.u_mul.sum_v[r] ^ snap_s[r]);
        n_net_toggles += $countones(dut.u_mac.u_mul.car_v[r] ^ snap_c[r]);
      end
      n_net_toggles += $countones(dut.u_mac.u_mul.p ^ snap_p);
      if (dut.dm_re) begin
        n_dm_addr_toggles += $countones(dut.dm_raddr ^ last_dm_addr);
        last_dm_addr = dut.dm_raddr;
      end
      if (dut.cm_re) begin
        n_cm_addr_toggles += $countones(dut.cm_raddr ^ last_cm_addr);
        last_cm_addr = dut.cm_raddr;
      end
    end
    for (int r = 0; r < W; r++) snap_pp[r] = dut.u_mac.u_mul.pp[r];
    for (int r = 0; r <= W; r++) begin
      snap_s[r] = dut.u_mac.u_mul.sum_v[r];
      snap_c[r] = dut.u_mac.u_mul.car_v[r];
    end
    snap_p = dut.u_mac.u_mul.p;
  end

  always @(posedge clk) begin
    if (rst_n && init_done) begin
      if (in_valid && !in_ready) n_in_stall++;
      if (out_valid && !out_ready) n_out_stall++;
      if (dut.u_rf.bypass_hit && dut.mac_issue) n_bypass++;
      if (dut.dm_re) n_dm_rd++;
      if (dut.cm_re) n_cm_rd++;
      if (dut.mac_issue) begin
        n_mul++;
        if (dut.mac_coef_load) n_coef_load++;
        else n_coef_reuse++;
      end
      if (dut.u_mac.mul_coef_q != last_coef_op) n_coef_toggle_bits += $countones(dut.u_mac.mul_coef_q ^ last_coef_op);
      if (dut.u_mac.mul_data_q != last_data_op) n_data_toggle_bits += $countones(dut.u_mac.mul_data_q ^ last_data_op);
      last_coef_op = dut.u_mac.mul_coef_q;
      last_data_op = dut.u_mac.mul_data_q;
    end
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h [MAXT];
  longint xs [];
  // multiplier-operand activity of the N = 32 lowpass runs, by block size
  real tog_h_per_block [MAXB+1];
  real tog_x_per_product [MAXB+1];
  real net_per_product [MAXB+1];
  real addr_per_output [MAXB+1];

  // kind: 0 lowpass, 1 bandpass, 2 random
  task automatic make_coefs(input int n, input int kind);
    for (int k = 0; k < MAXT; k++) h[k] = 0;
    for (int k = 0; k < n; k++) begin
      real t, win, v;
      t   = real'(k) - real'(n - 1) / 2.0;
      win = (n > 1) ? 0.54 - 0.46 * $cos(2.0 * PI * real'(k) / real'(n - 1)) : 1.0;
      v   = (t == 0.0) ? 0.25 : $sin(PI * 0.25 * t) / (PI * t);
      if (kind == 1) v = 2.0 * v * $cos(PI * 0.5 * t);
      v = v * win * 4.0 * 32767.0 * 0.9;
      if (v > 32767.0) v = 32767.0;
      if (v < -32768.0) v = -32768.0;
      h[k] = (kind == 2) ? longint'($signed(W'($urandom))) : longint'($rtoi(v));
    end
  endtask

  // One run: reset, load, stream nsamp samples, check every output.
  task automatic run(input int n, input int l, input int kind, input int nsamp,
                     input bit in_gaps, input bit out_gaps, input bit check_tables);
    int nout, got, last_t, blocks_seen, period_checked;
    real red_x, red_h, exp_x, exp_h;
    if (n != int'(num_taps) || l != int'(block_len)) n_mode_switch++;
    nout = ((nsamp + l - 1) / l) * l;
    xs = new[nout];
    foreach (xs[s]) xs[s] = longint'($signed(W'($urandom)));
    make_coefs(n, kind);
    @(negedge clk);
    rst_n = 0; in_valid = 0; out_ready = 1;
    num_taps = 8'(n); block_len = 5'(l);
    for (int k = 0; k < MAXT; k++) begin
      @(negedge clk);
      coef_we = 1; coef_waddr = 7'(k); coef_wdata = W'(h[k]);
    end
    @(negedge clk);
    coef_we = 0;
    rst_n = 1;
    // the sample memory is cleared first
    begin
      int c = 0;
      while (!init_done) begin @(negedge clk); c++; end
      checks++;
      if (c != 256) fail($sformatf("memory clear took %0d cycles", c));
      n_clear_runs++;
    end
    n_dm_rd = 0; n_cm_rd = 0; n_mul = 0; n_coef_load = 0;
    n_coef_toggle_bits = 0; n_data_toggle_bits = 0;
    n_net_toggles = 0; n_dm_addr_toggles = 0; n_cm_addr_toggles = 0;
    got = 0; last_t = -1; blocks_seen = 0; period_checked = 0;
    fork
      begin : drive_in
        int s = 0;
        while (s < nout) begin
          in_valid = in_gaps ? (($urandom % 4) == 0) : 1'b1;
          in_data  = W'(xs[s]);
          @(posedge clk);
          if (in_valid && in_ready) s++;
          #1;
        end
        in_valid = 0;
      end
      begin : take_out
        while (got < nout) begin
          out_ready = out_gaps ? (($urandom % 3) != 0) : 1'b1;
          @(posedge clk);
          if (out_valid && out_ready) begin
            longint y;
            y = 0;
            for (int k = 0; k < n; k++) if (got - k >= 0) y += h[k] * xs[got - k];
            checks++;
            if ($signed(out_data) != y)
              fail($sformatf("N=%0d L=%0d y(%0d) got %0d exp %0d", n, l, got, $signed(out_data), y));
            checks++;
            if (out_last !== ((got % l) == l - 1)) fail($sformatf("out_last at y(%0d)", got));
            if (out_last) begin
              int now;
              now = int'($time / 10);
              // steady state: input well ahead, output always ready
              if (!in_gaps && !out_gaps && blocks_seen >= 2 && got + 1 < nout - 8 * l) begin
                checks++;
                period_checked++;
                if (now - last_t != n * l + 2 * l + 4)
                  fail($sformatf("N=%0d L=%0d block period %0d", n, l, now - last_t));
              end
              last_t = now;
              blocks_seen++;
            end
            got++;
          end
          #1;
        end
        out_ready = 1;
      end
    join
    repeat (3) @(negedge clk);
    // memory traffic and coefficient-operand activity, per block
    checks++;
    if (n_cm_rd != blocks_seen * n) fail($sformatf("coefficient reads %0d", n_cm_rd));
    checks++;
    if (n_dm_rd != blocks_seen * (n - 1 + l)) fail($sformatf("sample reads %0d", n_dm_rd));
    checks++;
    if (n_mul != blocks_seen * n * l) fail($sformatf("products %0d", n_mul));
    checks++;
    if (n_coef_load != blocks_seen * n) fail($sformatf("coefficient loads %0d", n_coef_load));
    if (!in_gaps && !out_gaps && nout >= 20 * l) begin
      checks++;
      if (period_checked == 0) fail("no block period measured");
    end
    red_x = 100.0 * (1.0 - real'(n_dm_rd) / real'(n_mul));
    red_h = 100.0 * (1.0 - real'(n_cm_rd) / real'(n_mul));
    $display("N=%0d L=%0d outputs=%0d: sample reads/output %0.3f (-%0.2f%%), coefficient reads/output %0.3f (-%0.2f%%), coef-operand bit toggles/product %0.3f, data-operand %0.3f",
             n, l, nout, real'(n_dm_rd) / real'(nout), red_x, real'(n_cm_rd) / real'(nout), red_h,
             real'(n_coef_toggle_bits) / real'(n_mul), real'(n_data_toggle_bits) / real'(n_mul));
    if (n == 32 && kind == 0) begin
      tog_h_per_block[l]   = real'(n_coef_toggle_bits) / real'(blocks_seen);
      tog_x_per_product[l] = real'(n_data_toggle_bits) / real'(n_mul);
      net_per_product[l]   = real'(n_net_toggles) / real'(n_mul);
      addr_per_output[l]   = real'(n_dm_addr_toggles + n_cm_addr_toggles) / real'(nout);
    end
    if (check_tables && l > 1) begin
      case (l)
        2:  begin exp_x = 48.43; exp_h = 50.00; end
        4:  begin exp_x = 72.65; exp_h = 75.00; end
        8:  begin exp_x = 84.76; exp_h = 87.50; end
        default: begin exp_x = 90.82; exp_h = 93.75; end
      endcase
      checks++;
      if (red_x < exp_x - 0.01 || red_x > exp_x + 0.01) fail($sformatf("sample-read reduction %0.3f", red_x));
      checks++;
      if (red_h < exp_h - 0.01 || red_h > exp_h + 0.01) fail($sformatf("coefficient-read reduction %0.3f", red_h));
    end
  endtask

  initial begin
    last_coef_op = '0;
    last_data_op = '0;
    last_dm_addr = '0;
    last_cm_addr = '0;
    repeat (3) @(negedge clk);
    // the 6-tap, L = 3 example of the scheme
    run(6, 3, 2, 60, 1'b1, 1'b1, 1'b0);
    // N = 32 lowpass: memory-access table and multiplier-input activity;
    // L = 1 is the conventional one-sample-at-a-time order used as reference
    run(32, 1, 0, 1000, 1'b0, 1'b0, 1'b0);
    run(32, 2, 0, 1000, 1'b0, 1'b0, 1'b1);
    run(32, 4, 0, 1000, 1'b0, 1'b0, 1'b1);
    run(32, 8, 0, 1000, 1'b0, 1'b0, 1'b1);
    run(32, 16, 0, 1000, 1'b0, 1'b0, 1'b1);
    // The coefficient sequence per block is the same for every L, so the
    // coefficient-operand switching per product must fall as 1/L (to within the first load after reset)
    // (50/75/87.5/93.75 %). The data operand switches about half as often at
    // L = 2 (consecutive products share a sample) and about as often as the
    // reference for larger L.
    for (int l = 2; l <= 16; l *= 2) begin
      real r;
      r = tog_h_per_block[l] / tog_h_per_block[1];
      checks++;
      if (r < 0.99 || r > 1.01) fail($sformatf("coefficient switching per block differs at L=%0d (ratio %0.3f)", l, r));
      $display("L=%0d: reduction of switching per product against L=1: coefficient operand %0.2f%%, data operand %0.2f%%",
               l, 100.0 * (1.0 - r / real'(l)), 100.0 * (1.0 - tog_x_per_product[l] / tog_x_per_product[1]));
    end
    // Multiplier-internal switching (unweighted, zero-delay) and address-bus
    // switching against L = 1. Every block size must lower both; the
    // multiplier gains most at L = 2, where both operands switch less.
    for (int l = 2; l <= 16; l *= 2) begin
      real rn, ra;
      rn = 100.0 * (1.0 - net_per_product[l] / net_per_product[1]);
      ra = 100.0 * (1.0 - addr_per_output[l] / addr_per_output[1]);
      $display("L=%0d: multiplier net switching per product %0.2f%% lower, address-bus switching per output %0.2f%% lower",
               l, rn, ra);
      checks++;
      if (rn <= 0.0) fail($sformatf("no multiplier switching reduction at L=%0d", l));
      checks++;
      if (ra <= 0.0) fail($sformatf("no address-bus switching reduction at L=%0d", l));
      if (l > 2) begin
        checks++;
        if (net_per_product[l] <= net_per_product[2]) fail($sformatf("L=%0d beats L=2 in multiplier switching", l));
      end
    end
    // beyond L = 2 the saving grows again with the block size
    checks++;
    if (!(net_per_product[4] > net_per_product[8] && net_per_product[8] > net_per_product[16]))
      fail("multiplier switching does not fall from L=4 to L=16");
    checks++;
    if (tog_x_per_product[2] / tog_x_per_product[1] < 0.4 || tog_x_per_product[2] / tog_x_per_product[1] > 0.6)
      fail("data-operand switching at L=2 not about half");
    checks++;
    if (tog_x_per_product[4] / tog_x_per_product[1] < 0.85 || tog_x_per_product[4] / tog_x_per_product[1] > 1.15)
      fail("data-operand switching at L=4 not about that of L=1");
    // N = 89, the longest filter evaluated, with stalls on both streams
    run(89, 2, 1, 1000, 1'b0, 1'b1, 1'b0);
    run(89, 16, 0, 1000, 1'b1, 1'b1, 1'b0);
    // blocks of one sample use the register bypass; full-size corner
    run(5, 1, 2, 100, 1'b0, 1'b0, 1'b0);
    run(128, 16, 2, 200, 1'b0, 1'b1, 1'b0);
    $display("events: clears=%0d in_stalls=%0d out_stalls=%0d bypass=%0d mode_switches=%0d coef_reuse=%0d",
             n_clear_runs, n_in_stall, n_out_stall, n_bypass, n_mode_switch, n_coef_reuse);
    checks++; if (n_clear_runs == 0)  fail("memory clear never happened");
    checks++; if (n_in_stall == 0)    fail("input back-pressure never happened");
    checks++; if (n_out_stall == 0)   fail("output back-pressure never happened");
    checks++; if (n_bypass == 0)      fail("register bypass never used");
    checks++; if (n_mode_switch < 2)  fail("N/L never changed");
    checks++; if (n_coef_reuse == 0)  fail("coefficient never reused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
