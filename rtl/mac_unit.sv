// Multiply-accumulate unit: operand registers, array multiplier and the
// accumulator bank.
//
// Each cycle with issue high the unit captures a coefficient and a data
// sample into its two operand registers together with the index of the
// accumulator they belong to. The next cycle their product, from the
// combinational array multiplier, is added into that accumulator. The
// coefficient register is loaded only when coef_load is high: in block
// processing it is loaded once per coefficient and then held for the L
// products that share it, so the coefficient input of the multiplier does not
// switch in between (the source of the power saving).
//
// Interface: issue/coef_load/coef/data/acc_idx in; clr clears all
// accumulators (takes priority over an add landing in the same cycle);
// rd_idx/rd_data read one accumulator combinationally; busy is high while a
// product is still on its way to the bank.
// Timing: one product per clock, latency 2 from issue to the accumulator
// (operand register, then accumulate). A read of ACC_j sees every product
// issued two or more cycles earlier. The two-stage pipeline is this design's
// choice.
module mac_unit #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned NACC   = 16,
  parameter int unsigned ACC_W  = 2 * DATA_W + 7
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clr,
  input  logic                    issue,
  input  logic                    coef_load,
  input  logic [DATA_W-1:0]       coef,
  input  logic [DATA_W-1:0]       data,
  input  logic [$clog2(NACC)-1:0] acc_idx,
  input  logic [$clog2(NACC)-1:0] rd_idx,
  output logic [ACC_W-1:0]        rd_data,
  output logic                    busy,
  // Multiplier operand registers, brought out for activity measurement.
  output logic [DATA_W-1:0]       mul_coef_q,
  output logic [DATA_W-1:0]       mul_data_q
);
  logic                    mul_v_q;
  logic [$clog2(NACC)-1:0] mul_idx_q;
  logic [2*DATA_W-1:0]     product;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      mul_coef_q <= '0;
      mul_data_q <= '0;
      mul_idx_q  <= '0;
      mul_v_q    <= 1'b0;
    end else begin
      mul_v_q <= issue;
      if (issue) begin
        mul_data_q <= data;
        mul_idx_q  <= acc_idx;
      end
      if (issue && coef_load) mul_coef_q <= coef;
    end
  end

  array_multiplier #(.W(DATA_W)) u_mul (
    .a(mul_coef_q),
    .b(mul_data_q),
    .p(product)
  );

  accumulator_bank #(.NACC(NACC), .IN_W(2 * DATA_W), .ACC_W(ACC_W)) u_acc (
    .clk    (clk),
    .rst_n  (rst_n),
    .clr    (clr),
    .add_en (mul_v_q),
    .add_idx(mul_idx_q),
    .add_val(product),
    .rd_idx (rd_idx),
    .rd_data(rd_data)
  );

  assign busy = mul_v_q;
endmodule
