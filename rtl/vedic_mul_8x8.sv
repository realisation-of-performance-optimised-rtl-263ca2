// vedic_mul_8x8: 8-bit by 8-bit unsigned Vedic multiplier.
// The operands are split into 4-bit halves. Four vedic_mul_4x4 multipliers form
// the vertical and crosswise partial products aL*bL, aH*bL, aL*bH and
// aH*bH, all at once, and vedic_combine adds them with one 8-bit
// carry-save adder, an 8-bit ripple-carry adder and a 4-bit upper adder.
// The recursive structure (2x2 -> 4x4 -> 8x8 -> 16x16 -> 32x32, each level
// four multipliers of half the width and one carry-save adder) follows the
// improved multiplier; the adders after the carry-save adder are described
// in vedic_combine. Purely combinational: p follows a and b after the
// propagation delay, with no clock, reset or handshake.
module vedic_mul_8x8 (
  input  logic [7:0]   a,  // multiplicand, unsigned
  input  logic [7:0]   b,  // multiplier, unsigned
  output logic [15:0] p   // product a*b
);
  localparam int unsigned H = 4;

  logic [7:0] q0, q1, q2, q3;

  vedic_mul_4x4 u_ll (.a(a[H-1:0]),  .b(b[H-1:0]),  .p(q0));  // vertical, low
  vedic_mul_4x4 u_hl (.a(a[7:H]), .b(b[H-1:0]),  .p(q1));  // crosswise
  vedic_mul_4x4 u_lh (.a(a[H-1:0]),  .b(b[7:H]), .p(q2));  // crosswise
  vedic_mul_4x4 u_hh (.a(a[7:H]), .b(b[7:H]), .p(q3));  // vertical, high

  vedic_combine #(.N(8)) u_comb (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
