// Two's complement W x W array multiplier, built only from AND, OR and XOR.
//
// This is the multiplier of the single-multiplier DSP: its power is what
// block processing reduces, because the coefficient operand stays constant
// for L consecutive products.
//
// How it works: the Baugh-Wooley form turns the signed product into a sum of
// positive partial-product bits. Row j (operand b bit j) holds a_i & b_j for
// i < W-1; the bits that pair a sign bit with a non-sign bit are inverted
// (XOR with 1), the sign-sign bit a_{W-1} & b_{W-1} is kept, and the constant
// 2^W + 2^{2W-1} is added. The rows are reduced by W rows of full adders in
// carry-save form (one row of cells per partial product), and a ripple-carry
// row of full adders resolves the final sum and carry vectors.
// Cells whose inputs are constant zero are left to synthesis to remove.
//
// Interface: a and b are signed W-bit operands, p the signed 2W-bit product.
// Timing: purely combinational; the delay grows with W (array plus ripple).
// The gate-only construction follows the multiplier used to evaluate the
// scheme; the Baugh-Wooley arrangement and the ripple final adder are this
// design's choice.
module array_multiplier #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  localparam int unsigned PW = 2 * W;

  // Partial-product rows, each already shifted to its weight.
  logic [PW-1:0] pp [W];

  always_comb begin
    for (int j = 0; j < W; j++) begin
      pp[j] = '0;
      for (int i = 0; i < W; i++) begin
        if ((i == W - 1) ^ (j == W - 1))
          pp[j][i+j] = (a[i] & b[j]) ^ 1'b1;
        else
          pp[j][i+j] = a[i] & b[j];
      end
    end
  end

  // Constant correction term of the Baugh-Wooley form.
  localparam logic [PW-1:0] BW_CONST = (PW'(1) << W) | (PW'(1) << (PW - 1));

  // Carry-save array: sum_v[r], car_v[r] are the redundant sum after r rows.
  logic [PW-1:0] sum_v [W+1];
  logic [PW-1:0] car_v [W+1];

  assign sum_v[0] = BW_CONST;
  assign car_v[0] = '0;

  for (genvar r = 0; r < W; r++) begin : g_row
    logic [PW-1:0] cin_sh;
    logic [PW-1:0] co_row;
    // Carries move one column left between rows.
    assign cin_sh = {car_v[r][PW-2:0], 1'b0};
    for (genvar c = 0; c < PW; c++) begin : g_cell
      full_adder u_fa (
        .a (sum_v[r][c]),
        .b (cin_sh[c]),
        .c (pp[r][c]),
        .s (sum_v[r+1][c]),
        .co(co_row[c])
      );
    end
    assign car_v[r+1] = co_row;
  end

  // Final ripple-carry row: p = sum + (carry << 1), modulo 2^{2W}.
  logic [PW-1:0] fin_b;
  logic [PW:0]   rc;
  assign fin_b = {car_v[W][PW-2:0], 1'b0};
  assign rc[0] = 1'b0;
  for (genvar c = 0; c < PW; c++) begin : g_rca
    full_adder u_fa (
      .a (sum_v[W][c]),
      .b (fin_b[c]),
      .c (rc[c]),
      .s (p[c]),
      .co(rc[c+1])
    );
  end

endmodule
