// Self-checking test of coef_memory: random writes and reads against a reference
// array. Checks the one-cycle read latency, that rdata holds while no read is
// issued, and that a read and a write of the same address in one cycle
// return the old word.
module tb_coef_memory;
  localparam int DEPTH = 128, W = 16;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, re = 0;
  logic [$clog2(DEPTH)-1:0] waddr = 0, raddr = 0;
  logic [W-1:0] wdata = 0, rdata;
  logic [W-1:0] model [DEPTH];
  logic [W-1:0] expect_q;
  bit known = 0;

  coef_memory #(.DEPTH(DEPTH), .DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill every word first
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      we = 1; waddr = a[$clog2(DEPTH)-1:0]; wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    for (int t = 0; t < 8000; t++) begin
      @(negedge clk);
      if (known) begin
        checks++;
        if (rdata !== expect_q) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %h exp %h", t, rdata, expect_q);
        end
      end
      we    = $urandom % 2;
      re    = $urandom % 2;
      waddr = $clog2(DEPTH)'($urandom);
      raddr = ($urandom % 4 == 0) ? waddr : $clog2(DEPTH)'($urandom);
      wdata = W'($urandom);
      if (re) begin expect_q = model[raddr]; known = 1; end
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
