// vedic_mul_4x4: 4-bit by 4-bit unsigned Vedic multiplier.
// The operands are split into 2-bit halves. Four vedic_mul_2x2 multipliers form
// the vertical and crosswise partial products aL*bL, aH*bL, aL*bH and
// aH*bH, all at once, and vedic_combine adds them with one 4-bit
// carry-save adder, a 4-bit ripple-carry adder and a 2-bit upper adder.
// The recursive structure (2x2 -> 4x4 -> 8x8 -> 16x16 -> 32x32, each level
// four multipliers of half the width and one carry-save adder) follows the
// improved multiplier; the adders after the carry-save adder are described
// in vedic_combine. Purely combinational: p follows a and b after the
// propagation delay, with no clock, reset or handshake.
module vedic_mul_4x4 (
  input  logic [3:0]   a,  // multiplicand, unsigned
  input  logic [3:0]   b,  // multiplier, unsigned
  output logic [7:0] p   // product a*b
);
  localparam int unsigned H = 2;

  logic [3:0] q0, q1, q2, q3;

  vedic_mul_2x2 u_ll (.a(a[H-1:0]),  .b(b[H-1:0]),  .p(q0));  // vertical, low
  vedic_mul_2x2 u_hl (.a(a[3:H]), .b(b[H-1:0]),  .p(q1));  // crosswise
  vedic_mul_2x2 u_lh (.a(a[H-1:0]),  .b(b[3:H]), .p(q2));  // crosswise
  vedic_mul_2x2 u_hh (.a(a[3:H]), .b(b[3:H]), .p(q3));  // vertical, high

  vedic_combine #(.N(4)) u_comb (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
