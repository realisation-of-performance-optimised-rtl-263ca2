// full_adder: adds three one-bit operands.
// Built, as is usual, from two half adders and an OR gate: the first half
// adder adds x and y, the second adds that partial sum to the carry input z,
// and the OR of the two half-adder carries is the carry output, so that
//   s = x ^ y ^ z,  c = x & y | z & (x ^ y).
// Used as the cell of both the ripple-carry adder and the carry-save adder.
// Purely combinational.
module full_adder (
  input  logic x,  // operand
  input  logic y,  // operand
  input  logic z,  // carry input
  output logic s,  // sum,   weight 1
  output logic c   // carry, weight 2
);
  logic s1, c1, c2;

  half_adder u_ha0 (.x(x),  .y(y), .s(s1), .c(c1));
  half_adder u_ha1 (.x(s1), .y(z), .s(s),  .c(c2));

  always_comb c = c1 | c2;
endmodule
