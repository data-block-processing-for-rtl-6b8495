// Input unit: takes input samples from a valid/ready stream and writes them
// into the circular data memory.
//
// After reset it first clears the whole data memory (one word per cycle,
// DEPTH cycles), so that samples before the start of the stream read as zero.
// It then writes sample number wr_count to address wr_count mod DEPTH. A new
// sample is accepted only while it would not overwrite a sample the
// controller still needs: keep_from is the number of the oldest such sample,
// and in_ready drops (back-pressure) once DEPTH samples from keep_from onward
// are held. stall is high in a cycle where a sample is offered but refused
// after the clear has finished.
//
// Interface: in_valid/in_data/in_ready (sample accepted when valid and ready
// are both high at a rising edge); memory write port mem_we/mem_waddr/
// mem_wdata; wr_count = number of samples accepted so far (modulo 2^CNT_W).
// Timing: one sample per cycle at most; init_done rises DEPTH cycles after
// reset. The stream protocol, the clear and the back-pressure rule are this
// design's choice; the published scheme only names an input unit.
module input_unit #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned CNT_W  = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [DATA_W-1:0]        in_data,
  output logic                     in_ready,
  input  logic [CNT_W-1:0]         keep_from,
  output logic [CNT_W-1:0]         wr_count,
  output logic                     init_done,
  output logic                     stall,
  output logic                     mem_we,
  output logic [$clog2(DEPTH)-1:0] mem_waddr,
  output logic [DATA_W-1:0]        mem_wdata
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW-1:0]    clr_addr_q;
  logic [CNT_W-1:0] held;
  logic             accept;

  assign held     = wr_count - keep_from;
  assign in_ready = init_done && (held < CNT_W'(DEPTH));
  assign accept   = in_valid && in_ready;
  assign stall    = init_done && in_valid && !in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      clr_addr_q <= '0;
      init_done  <= 1'b0;
      wr_count   <= '0;
    end else if (!init_done) begin
      clr_addr_q <= clr_addr_q + 1'b1;
      if (clr_addr_q == AW'(DEPTH - 1)) init_done <= 1'b1;
    end else if (accept) begin
      wr_count <= wr_count + 1'b1;
    end
  end

  always_comb begin
    if (!init_done) begin
      mem_we    = rst_n;
      mem_waddr = clr_addr_q;
      mem_wdata = '0;
    end else begin
      mem_we    = accept;
      mem_waddr = wr_count[AW-1:0];
      mem_wdata = in_data;
    end
  end

  initial assert (DEPTH == (1 << AW)) else $error("DEPTH must be a power of two");
endmodule
