// Output unit: reads the finished output block out of the accumulators and
// sends it on a valid/ready stream, one output per transfer.
//
// A pulse on start with len = L begins a block. The unit then reads
// ACC_0 .. ACC_{L-1} in order through rd_idx/rd_data (a combinational read
// port of the accumulator bank) into its output register. ACC_j holds output
// y(m+j) of the block that starts at sample m, so outputs leave in time
// order. out_last marks the last output of a block and done is high in the
// cycle that output is accepted.
//
// Timing: the first output is valid two cycles after start; with out_ready
// held high one output leaves per cycle. out_data is held stable while
// out_valid is high and out_ready low. The stream protocol is this design's
// choice; the published scheme only names an output unit.
module output_unit #(
  parameter int unsigned NACC  = 16,
  parameter int unsigned ACC_W = 39
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  logic [$clog2(NACC+1)-1:0]     len,
  output logic [$clog2(NACC)-1:0]       rd_idx,
  input  logic [ACC_W-1:0]              rd_data,
  output logic                          out_valid,
  output logic [ACC_W-1:0]              out_data,
  output logic                          out_last,
  input  logic                          out_ready,
  output logic                          done
);
  localparam int unsigned LW = $clog2(NACC + 1);

  logic          busy_q;
  logic [LW-1:0] idx_q;
  logic [LW-1:0] len_q;

  assign rd_idx = idx_q[$clog2(NACC)-1:0];
  assign done   = out_valid && out_ready && out_last;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      idx_q     <= '0;
      len_q     <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (start) begin
        busy_q <= 1'b1;
        idx_q  <= '0;
        len_q  <= len;
      end else if (busy_q && (!out_valid || out_ready)) begin
        out_data  <= rd_data;
        out_valid <= 1'b1;
        out_last  <= (idx_q == len_q - 1'b1);
        idx_q     <= idx_q + 1'b1;
        if (idx_q == len_q - 1'b1) busy_q <= 1'b0;
      end
    end
  end

  // Stream rule: an offered output stays unchanged until it is taken.
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_data) && $stable(out_last));
  endproperty
  assert property (p_hold) else $error("output changed while stalled");
endmodule
