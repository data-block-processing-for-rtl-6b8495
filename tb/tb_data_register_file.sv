// Self-checking test of data_register_file: random writes and reads against
// a reference array, including reads of the register being written in the
// same cycle (bypass must return the new value).
module tb_data_register_file;
  localparam int NREG = 16, W = 16;
  int checks = 0, failures = 0, bypasses = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic bypass_hit;
  logic [W-1:0] model [NREG];

  data_register_file #(.NREG(NREG), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[r]) model[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      we    = $urandom % 2;
      waddr = 4'($urandom);
      wdata = W'($urandom);
      raddr = ($urandom % 3 == 0) ? waddr : 4'($urandom);
      #1;
      checks++;
      if (rdata !== ((we && waddr == raddr) ? wdata : model[raddr])) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d R%0d got %h", t, raddr, rdata);
      end
      checks++;
      if (bypass_hit !== (we && waddr == raddr)) failures++;
      if (bypass_hit) bypasses++;
      if (we) model[waddr] = wdata;
    end
    checks++;
    if (bypasses == 0) failures++;
    $display("bypass reads: %0d", bypasses);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
