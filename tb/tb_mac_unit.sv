// Self-checking test of mac_unit: random coefficient/data pairs issued into
// random accumulators, with the coefficient register loaded only on some
// issues (as in block processing). Checks that each product lands in its
// accumulator two cycles after issue, that the coefficient operand holds its
// value between loads, and that clr empties the bank.
module tb_mac_unit;
  localparam int W = 16, NACC = 16, ACC_W = 39;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, issue = 0, coef_load = 0;
  logic [W-1:0] coef = 0, data = 0;
  logic [3:0] acc_idx = 0, rd_idx = 0;
  logic [ACC_W-1:0] rd_data;
  logic busy;
  logic [W-1:0] mul_coef_q, mul_data_q;
  longint model [NACC];
  longint held_coef;
  // products waiting to land: issued at negedge t, in accumulator after 2 posedges
  longint pend_val [2];
  int     pend_idx [2];
  bit     pend_v   [2];

  mac_unit #(.DATA_W(W), .NACC(NACC), .ACC_W(ACC_W)) dut (.*);

  always #50 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[j]) model[j] = 0;
    pend_v[0] = 0; pend_v[1] = 0;
    held_coef = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      // retire the product issued two cycles ago
      if (pend_v[1]) model[pend_idx[1]] += pend_val[1];
      pend_v[1] = pend_v[0]; pend_val[1] = pend_val[0]; pend_idx[1] = pend_idx[0];
      for (int j = 0; j < NACC; j++) begin
        rd_idx = 4'(j); #1;
        checks++;
        if ($signed(rd_data) != model[j]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d ACC_%0d got %0d exp %0d", t, j, $signed(rd_data), model[j]);
        end
      end
      checks++;
      if (longint'($signed(mul_coef_q)) != held_coef) begin
        failures++;
        $display("FAIL t=%0d coefficient operand changed", t);
      end
      clr       = (t % 500) == 499;
      issue     = !clr && (($urandom % 5) != 0);
      coef_load = ($urandom % 4) == 0;
      coef      = W'($urandom);
      data      = W'($urandom);
      acc_idx   = 4'($urandom);
      if (clr) begin
        foreach (model[j]) model[j] = 0;
        pend_v[1] = 0;   // the product landing with clr is dropped
      end
      if (issue && coef_load) held_coef = longint'($signed(coef));
      pend_v[0]   = issue;
      pend_idx[0] = acc_idx;
      pend_val[0] = held_coef * longint'($signed(data));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
