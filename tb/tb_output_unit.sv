// Self-checking test of output_unit: blocks of random length L are read from
// a model accumulator array and must leave in order ACC_0..ACC_{L-1}, with
// out_last on the last one, done in the cycle it is taken, and data held
// while out_ready is low. With out_ready held high the block must take
// done must come L + 1 cycles after the start cycle.
module tb_output_unit;
  localparam int NACC = 16, ACC_W = 39;
  int checks = 0, failures = 0, held = 0;
  logic clk = 0, rst_n = 0, start = 0, out_valid, out_last, out_ready = 1, done;
  logic [4:0] len = 1;
  logic [3:0] rd_idx;
  logic [ACC_W-1:0] rd_data, out_data;
  logic [ACC_W-1:0] acc [NACC];

  assign rd_data = acc[rd_idx];

  output_unit #(.NACC(NACC), .ACC_W(ACC_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 400; blk++) begin
      int l, got, cyc, done_cyc;
      bit stall_mode;
      l = 1 + ($urandom % NACC);
      stall_mode = blk % 2;
      foreach (acc[j]) acc[j] = {7'($urandom), $urandom};
      @(negedge clk);
      start = 1; len = 5'(l);
      @(negedge clk);
      start = 0;
      got = 0; cyc = 1;
      while (got < l) begin
        out_ready = stall_mode ? (($urandom % 3) != 0) : 1'b1;
        #1;
        if (out_valid && out_ready) begin
          checks++;
          if (out_data !== acc[got]) fail($sformatf("blk %0d out %0d", blk, got));
          checks++;
          if (out_last !== (got == l - 1)) fail("out_last");
          checks++;
          if (done !== (got == l - 1)) fail("done");
          if (got == l - 1) done_cyc = cyc;
          got++;
        end else if (out_valid) begin
          logic [ACC_W-1:0] d;
          d = out_data;
          @(posedge clk); #1;
          checks++;
          if (!(out_valid && out_data == d)) fail("output not held");
          held++;
          @(negedge clk);
          cyc++;
          continue;
        end
        @(negedge clk);
        cyc++;
      end
      if (!stall_mode) begin
        checks++;
        if (done_cyc != l + 1) fail($sformatf("block of %0d took %0d cycles", l, done_cyc));
      end
    end
    checks++;
    if (held == 0) fail("no back-pressure seen");
    $display("held outputs: %0d", held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
