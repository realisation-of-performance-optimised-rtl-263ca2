// vedic_mul_2x2: 2-bit by 2-bit unsigned multiplier, the leaf of the
// Vedic (Urdhva Tiryagbhyam, "vertically and crosswise") multiplier tree.
// Four AND gates form the bit products. The vertical product a0*b0 is
// product bit 0; the two crosswise products a1*b0 and a0*b1 go through a
// first half adder (bit 1); the vertical product a1*b1 and that carry go
// through a second half adder (bits 2 and 3). Two half adders, as in the
// classic 2x2 binary multiplier. Purely combinational.
module vedic_mul_2x2 (
  input  logic [1:0] a,  // multiplicand
  input  logic [1:0] b,  // multiplier
  output logic [3:0] p   // product a*b
);
  logic pp00, pp10, pp01, pp11, c1;

  always_comb begin
    pp00 = a[0] & b[0];
    pp10 = a[1] & b[0];
    pp01 = a[0] & b[1];
    pp11 = a[1] & b[1];
    p[0] = pp00;
  end

  half_adder u_ha0 (.x(pp10), .y(pp01), .s(p[1]), .c(c1));
  half_adder u_ha1 (.x(pp11), .y(c1),   .s(p[2]), .c(p[3]));
endmodule
