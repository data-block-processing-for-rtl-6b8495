// Self-checking test of accumulator_bank: random clears and signed additions
// into random accumulators, every accumulator compared each cycle with a
// reference model kept in the testbench.
module tb_accumulator_bank;
  localparam int NACC = 16, IN_W = 32, ACC_W = 39;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clr = 0, add_en = 0;
  logic [3:0] add_idx = 0, rd_idx = 0;
  logic [IN_W-1:0] add_val = 0;
  logic [ACC_W-1:0] rd_data;
  longint model [NACC];

  accumulator_bank #(.NACC(NACC), .IN_W(IN_W), .ACC_W(ACC_W)) dut (.*);

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
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      // check all accumulators through the read port
      for (int j = 0; j < NACC; j++) begin
        rd_idx = 4'(j); #1;
        checks++;
        if ($signed(rd_data) != model[j]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d ACC_%0d got %0d exp %0d", t, j, $signed(rd_data), model[j]);
        end
      end
      clr     = ($urandom % 200) == 0;
      add_en  = ($urandom % 4) != 0;
      add_idx = 4'($urandom);
      add_val = $urandom;
      if (clr) foreach (model[j]) model[j] = 0;
      else if (add_en) model[add_idx] += longint'($signed(add_val));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
