// Bank of accumulators ACC_0 .. ACC_{NACC-1} of the block-processing MAC.
//
// Output j of the current block is built up in ACC_j: every product of a
// coefficient with the j-th sample of the block window is added into it.
// When clr is high all accumulators are set to zero; otherwise, when add_en is
// high, ACC_{add_idx} takes ACC_{add_idx} + add_val (add_val sign-extended).
// clr has priority. The read port is combinational: rd_data = ACC_{rd_idx}.
// Timing: one addition per clock, written at the rising edge; synchronous
// active-low reset clears the bank. The number of accumulators follows the
// block size of the scheme; the widths are this design's choice: ACC_W should
// leave log2(taps) guard bits above the product width so a sum never wraps.
module accumulator_bank #(
  parameter int unsigned NACC  = 16,
  parameter int unsigned IN_W  = 32,
  parameter int unsigned ACC_W = 39
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    add_en,
  input  logic [$clog2(NACC)-1:0] add_idx,
  input  logic [IN_W-1:0]         add_val,
  input  logic [$clog2(NACC)-1:0] rd_idx,
  output logic [ACC_W-1:0]        rd_data
);
  logic [ACC_W-1:0] acc_q [NACC];

  logic [ACC_W-1:0] add_ext;
  assign add_ext = ACC_W'($signed(add_val));

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      for (int j = 0; j < NACC; j++) acc_q[j] <= '0;
    end else if (add_en) begin
      acc_q[add_idx] <= acc_q[add_idx] + add_ext;
    end
  end

  assign rd_data = acc_q[rd_idx];

  initial begin
    assert (ACC_W >= IN_W) else $error("ACC_W must not be narrower than IN_W");
    assert (NACC >= 2) else $error("NACC must be at least 2");
  end

  always_ff @(posedge clk) begin
    if (rst_n && add_en && !clr)
      assert (int'(add_idx) < NACC) else $error("accumulator index out of range");
  end
endmodule
