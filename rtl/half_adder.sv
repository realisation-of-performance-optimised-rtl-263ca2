// half_adder: adds two one-bit operands.
// The sum is the exclusive OR of the inputs and the carry is their AND,
// the textbook gate-level half adder. It is the smallest cell of the
// multiplier tree: the 2x2 multipliers use it, and two of them with an OR
// gate make the full adder. Purely combinational, no clock or reset.
module half_adder (
  input  logic x,  // addend
  input  logic y,  // augend
  output logic s,  // sum,   weight 1
  output logic c   // carry, weight 2
);
  always_comb begin
    s = x ^ y;
    c = x & y;
  end
endmodule
