// Test harness for one data width of block_fir_dsp (used by
// tb_block_fir_widths). It drives one core built with DATA_W = W through a
// list of filter lengths and block sizes, with uniformly distributed random
// W-bit samples and a lowpass (N = 32) or random (N = 89) coefficient set,
// and compares every output
// with the convolution sum. For N = 32 it also counts, per product, the
// switching of the nets inside the gate-level multiplier (partial products,
// full-adder sums and carries, sampled once per cycle) at L = 1, 2, 4, 8, 16
// and requires every block size to switch less than L = 1, L = 2 to switch
// least, and the switching to fall from L = 4 to L = 16.
// Raises done when finished and reports its counts.
module fir_width_harness #(
  parameter int W = 8
) (
  output int  checks,
  output int  failures,
  output bit  done
);
  localparam int MAXB = 16, MAXT = 128, ACC_W = 2 * W + 7;
  logic clk = 0, rst_n = 0;
  logic [7:0] num_taps = 1;
  logic [4:0] block_len = 1;
  logic coef_we = 0;
  logic [6:0] coef_waddr = 0;
  logic [W-1:0] coef_wdata = 0, in_data = 0;
  logic in_valid = 0, in_ready, out_valid, out_last, out_ready = 1, init_done;
  logic [ACC_W-1:0] out_data;
  longint h [MAXT];
  longint hset32 [MAXT];
  longint hset89 [MAXT];
  longint xs [];
  // zero-delay switching of the multiplier's internal nets, per product
  longint n_net, n_mul;
  logic [2*W-1:0] snap_pp [W];
  logic [2*W-1:0] snap_s  [W+1];
  logic [2*W-1:0] snap_c  [W+1];
  real net_per_product [MAXB+1];

  always @(posedge clk) begin
    if (rst_n && init_done) begin
      for (int r = 0; r < W; r++) n_net += $countones(dut.u_mac.u_mul.pp[r] ^ snap_pp[r]);
      for (int r = 0; r <= W; r++) begin
        n_net += $countones(dut.u_mac.u_mul.sum_v[r] ^ snap_s[r]);
        n_net += $countones(dut.u_mac.u_mul.car_v[r] ^ snap_c[r]);
      end
      if (dut.mac_issue) n_mul++;
    end
    for (int r = 0; r < W; r++) snap_pp[r] = dut.u_mac.u_mul.pp[r];
    for (int r = 0; r <= W; r++) begin
      snap_s[r] = dut.u_mac.u_mul.sum_v[r];
      snap_c[r] = dut.u_mac.u_mul.car_v[r];
    end
  end

  block_fir_dsp #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic run(input int n, input int l, input int nsamp);
    int nout, got;
    nout = ((nsamp + l - 1) / l) * l;
    xs = new[nout];
    foreach (xs[s]) xs[s] = longint'($signed(W'({$urandom, $urandom})));
    for (int k = 0; k < MAXT; k++) h[k] = (k >= n) ? 0 : (n == 32) ? hset32[k] : hset89[k];
    @(negedge clk);
    rst_n = 0; num_taps = 8'(n); block_len = 5'(l);
    for (int k = 0; k < MAXT; k++) begin
      @(negedge clk);
      coef_we = 1; coef_waddr = 7'(k); coef_wdata = W'(h[k]);
    end
    @(negedge clk);
    coef_we = 0; rst_n = 1;
    while (!init_done) @(negedge clk);
    got = 0;
    n_net = 0;
    n_mul = 0;
    fork
      begin
        int s = 0;
        while (s < nout) begin
          in_valid = 1; in_data = W'(xs[s]);
          @(posedge clk);
          if (in_ready) s++;
          #1;
        end
        in_valid = 0;
      end
      begin
        while (got < nout) begin
          @(posedge clk);
          if (out_valid) begin
            longint y;
            y = 0;
            for (int k = 0; k < n; k++) if (got - k >= 0) y += h[k] * xs[got - k];
            checks++;
            if ($signed(out_data) != y) begin
              failures++;
              if (failures < 10) $display("FAIL W=%0d N=%0d L=%0d y(%0d) got %0d exp %0d", W, n, l, got, $signed(out_data), y);
            end
            got++;
          end
          #1;
        end
      end
    join
    if (n == 32) net_per_product[l] = real'(n_net) / real'(n_mul);
  endtask

  initial begin
    checks = 0; failures = 0; done = 0;
    // N = 32: Hamming-windowed lowpass (cut-off a quarter of the sample
    // rate) scaled to W bits; N = 89: random W-bit coefficients
    for (int k = 0; k < MAXT; k++) begin
      real t, v;
      t = real'(k) - 15.5;
      v = $sin(3.14159265358979 * 0.25 * t) / (3.14159265358979 * t)
          * (0.54 - 0.46 * $cos(2.0 * 3.14159265358979 * real'(k) / 31.0))
          * 3.6 * real'((longint'(1) << (W - 1)) - 1);
      hset32[k] = (k < 32) ? longint'($rtoi(v)) : 0;
      hset89[k] = longint'($signed(W'({$urandom, $urandom})));
    end
    repeat (3) @(negedge clk);
    // N = 32, 1000 samples, L = 1 as the one-product-per-fetch reference
    for (int l = 1; l <= 16; l *= 2) run(32, l, 1000);
    run(89, 4, 200);
    run(89, 8, 200);
    // every block size must switch the multiplier less than L = 1
    for (int l = 2; l <= 16; l *= 2) begin
      real red;
      red = 100.0 * (1.0 - net_per_product[l] / net_per_product[1]);
      $display("W=%0d L=%0d: multiplier net switching per product %0.2f%% lower than L=1", W, l, red);
      checks++;
      if (red <= 0.0) failures++;
    end
    // profile of the lowpass case: largest saving at L = 2, and from L = 4
    // on the saving grows with L
    for (int l = 4; l <= 16; l *= 2) begin
      checks++;
      if (net_per_product[l] <= net_per_product[2]) failures++;
    end
    checks++;
    if (!(net_per_product[4] > net_per_product[8] && net_per_product[8] > net_per_product[16])) failures++;
    done = 1;
  end
endmodule
