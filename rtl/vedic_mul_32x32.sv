// vedic_mul_32x32: 32-bit by 32-bit unsigned Vedic multiplier.
// The operands are split into 16-bit halves. Four vedic_mul_16x16 multipliers form
// the vertical and crosswise partial products aL*bL, aH*bL, aL*bH and
// aH*bH, all at once, and vedic_combine adds them with one 32-bit
// carry-save adder, a 32-bit ripple-carry adder and a 16-bit upper adder.
// The recursive structure (2x2 -> 4x4 -> 8x8 -> 16x16 -> 32x32, each level
// four multipliers of half the width and one carry-save adder) follows the
// improved multiplier; the adders after the carry-save adder are described
// in vedic_combine. Purely combinational: p follows a and b after the
// propagation delay, with no clock, reset or handshake.
module vedic_mul_32x32 (
  input  logic [31:0]   a,  // multiplicand, unsigned
  input  logic [31:0]   b,  // multiplier, unsigned
  output logic [63:0] p   // product a*b
);
  localparam int unsigned H = 16;

  logic [31:0] q0, q1, q2, q3;

  vedic_mul_16x16 u_ll (.a(a[H-1:0]),  .b(b[H-1:0]),  .p(q0));  // vertical, low
  vedic_mul_16x16 u_hl (.a(a[31:H]), .b(b[H-1:0]),  .p(q1));  // crosswise
  vedic_mul_16x16 u_lh (.a(a[H-1:0]),  .b(b[31:H]), .p(q2));  // crosswise
  vedic_mul_16x16 u_hh (.a(a[31:H]), .b(b[31:H]), .p(q3));  // vertical, high

  vedic_combine #(.N(32)) u_comb (
    .q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p)
  );
endmodule
