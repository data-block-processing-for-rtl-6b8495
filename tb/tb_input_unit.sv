// Self-checking test of input_unit with a 16-word memory: the clear after
// reset must write zero to every address and then raise init_done; afterwards
// every accepted sample must be written to (sample number mod DEPTH), and
// in_ready must follow the rule "fewer than DEPTH samples held from
// keep_from on". keep_from is advanced at random so that both accepted
// samples and back-pressure stalls occur.
module tb_input_unit;
  localparam int DEPTH = 16, W = 16, CW = 32;
  int checks = 0, failures = 0, stalls = 0, accepted = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, in_ready, init_done, stall, mem_we;
  logic [W-1:0] in_data = 0, mem_wdata;
  logic [CW-1:0] keep_from = 0, wr_count;
  logic [3:0] mem_waddr;
  bit cleared [DEPTH];
  int exp_count = 0;

  input_unit #(.DEPTH(DEPTH), .DATA_W(W), .CNT_W(CW)) dut (.*);

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    foreach (cleared[a]) cleared[a] = 0;
    keep_from = CW'(-5);   // pretend five older samples are still needed
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    in_valid = 1;          // offered during the clear: must not be taken
    cyc = 0;
    while (1) begin
      #1;
      if (init_done) begin
        in_valid = 0;
        break;
      end
      checks++;
      if (in_ready) fail("ready during clear");
      checks++;
      if (!(mem_we && mem_wdata == 0)) fail("clear write missing");
      cleared[mem_waddr] = 1;
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (cyc != DEPTH) fail($sformatf("clear took %0d cycles", cyc));
    foreach (cleared[a]) begin
      checks++;
      if (!cleared[a]) fail($sformatf("address %0d not cleared", a));
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      in_valid = ($urandom % 4) != 0;
      in_data  = W'($urandom);
      if ($urandom % 3 == 0 && (wr_count - keep_from) > 2) keep_from = keep_from + 1;
      #1;
      checks++;
      if (in_ready !== ((wr_count - keep_from) < DEPTH)) fail("in_ready rule");
      checks++;
      if (wr_count != CW'(exp_count)) fail("wr_count");
      checks++;
      if (stall !== (in_valid && !in_ready)) fail("stall flag");
      if (in_valid && in_ready) begin
        checks++;
        if (!(mem_we && mem_waddr == 4'(exp_count) && mem_wdata == in_data))
          fail($sformatf("write of sample %0d", exp_count));
        exp_count++;
        accepted++;
      end else begin
        checks++;
        if (mem_we) fail("spurious write");
      end
      if (stall) stalls++;
    end
    checks++;
    if (stalls == 0 || accepted == 0) fail("no stall or no sample seen");
    $display("accepted=%0d stalls=%0d", accepted, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
