// One-bit full adder written with AND, OR and XOR gates only.
//
// Cell of the carry-save array in array_multiplier. sum = a ^ b ^ c,
// carry = majority(a, b, c). Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  logic ab_x;
  assign ab_x = a ^ b;
  assign s    = ab_x ^ c;
  assign co   = (a & b) | (ab_x & c);
endmodule
