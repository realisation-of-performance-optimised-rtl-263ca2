// vedic_mul_16x16: 16-bit by 16-bit unsigned Vedic multiplier.
// The operands are split into 8-bit halves. Four vedic_mul_8x8 multipliers form
// the vertical and crosswise partial products aL*bL, aH*bL, aL*bH and
// aH*bH, all at once, and vedic_combine adds them with one 16-bit
// carry-save adder, a 16-bit ripple-carry adder and a 8-bit upper adder.
// The recursive structure (2x2 -> 4x4 -> 8x8 -> 16x16 -> 32x32, each level
// four multipliers of half the width and one carry-save adder) follows the
// improved multiplier; the adders after the carry-save adder are described
// in vedic_combine. Purely combinational: p follows a and b after the
// propagation delay, with no clock, reset or handshake.
module vedic_mul_16x16 (
  input  logic [15:0]   a,  // multiplicand, unsigned
  input  logic [15:0]   b,  // multiplier, unsigned
  output logic [31:0] p   // product a*b
);
  localparam int unsigned H = 8;

  logic [15:0] q0, q1, q2, q3;

  vedic_mul_8x8 u_ll (.a(a[H-1:0]),  .b(b[H-1:0]),  .p(q0));  // vertical, low
  vedic_mul_8x8 u_hl (.a(a[15:H]), .b(b[H-1:0]),  .p(q1));  // crosswise
  vedic_mul_8x8 u_lh (.a(a[H-1:0]),  .b(b[15:H]), .p(q2));  // crosswise
  vedic_mul_8x8 u_hh (.a(a[15:H]), .b(b[15:H]), .p(q3));  // vertical, high

  vedic_combine #(.N(16)) u_comb (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
