// Data register file R_0 .. R_{NREG-1} of the block-processing scheme.
//
// The current window of L input samples lives here. Each new coefficient
// replaces only the oldest sample of the window, and the registers are read
// in circular order, so L-1 of the L samples are reused from registers instead
// of being fetched again from data memory.
//
// Interface: one write port (we, waddr, wdata) and one combinational read
// port (raddr, rdata). When the register being read is written in the same
// cycle, rdata returns the incoming wdata (write-to-read bypass); this is what
// lets a block of one sample (L = 1) run without a stall.
// Timing: the write takes effect at the rising edge. Reset clears all
// registers. The register file itself follows the scheme; the bypass is this
// design's choice.
module data_register_file #(
  parameter int unsigned NREG   = 16,
  parameter int unsigned DATA_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [$clog2(NREG)-1:0] waddr,
  input  logic [DATA_W-1:0]       wdata,
  input  logic [$clog2(NREG)-1:0] raddr,
  output logic [DATA_W-1:0]       rdata,
  output logic                    bypass_hit
);
  logic [DATA_W-1:0] regs_q [NREG];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) regs_q[r] <= '0;
    end else if (we) begin
      regs_q[waddr] <= wdata;
    end
  end

  assign bypass_hit = we && (waddr == raddr);
  assign rdata      = bypass_hit ? wdata : regs_q[raddr];

  initial assert (NREG >= 2) else $error("NREG must be at least 2");
endmodule
