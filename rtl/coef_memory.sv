// Coefficient memory of the DSP.
//
// Holds the filter coefficients, h(k) at address k. A host loads them through
// the write port before filtering starts; the controller reads one
// coefficient per group of L products.
//
// Interface: we/waddr/wdata write at the rising edge; re/raddr start a read
// whose result appears on rdata the next cycle and stays there until the next
// read, so a coefficient that is used for L consecutive products is read only
// once. Contents are not reset. The memory is named by the DSP architecture;
// the host write port and synchronous read are this design's choice.
module coef_memory #(
  parameter int unsigned DEPTH  = 128,
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
