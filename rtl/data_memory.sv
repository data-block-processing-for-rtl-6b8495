// Data (sample) memory of the DSP.
//
// Holds the most recent DEPTH input samples as a circular buffer: sample
// number s is kept at address s mod DEPTH. One write port, used by the input
// unit, and one read port, used by the controller to fetch samples.
//
// Interface: we/waddr/wdata write at the rising edge; re/raddr start a read
// whose result appears on rdata the next cycle and is held until the next
// read. Reading an address in the same cycle as it is written returns the old
// word. Contents are not reset (the input unit clears the memory after reset).
// The memory is named by the DSP architecture; its organisation as a circular
// buffer with a synchronous read is this design's choice.
module data_memory #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DATA_W-1:0]        wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DATA_W-1:0]        rdata
);
  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end
endmodule
