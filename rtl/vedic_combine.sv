// vedic_combine: adds the four partial products of one level of the Vedic
// multiplier tree using a single carry-save adder.
//
// An N x N product is split, Urdhva Tiryagbhyam style, into halves of
// H = N/2 bits: a = aH:aL, b = bH:bL. Four H x H multipliers give
//   q0 = aL*bL (vertical, low)     q1 = aH*bL (crosswise)
//   q2 = aL*bH (crosswise)         q3 = aH*bH (vertical, high)
// each N bits wide, and a*b = q0 + (q1 + q2) << H + q3 << N.
//
// How the sum is formed:
//   * p[H-1:0] is q0[H-1:0]; nothing else reaches those bits.
//   * One N-bit CSA compresses the three N-bit words aligned at bit H:
//     q1, q2 and {q3[H-1:0], q0[N-1:H]} into a sum and a carry word.
//   * An N-bit ripple-carry adder adds sum and carry (the carry word
//     shifted up by one, its top bit left out) to give p[H+N-1:H].
//   * An H-bit ripple-carry adder adds the top half of q3, the carry
//     word's top bit and the N-bit adder's carry out to give p[2N-1:H+N].
// The product always fits in 2N bits, so the last adder never carries out;
// an assertion checks that. For N = 32 these are the 32-bit CSA and the
// 16-bit adder of the 32-bit multiplier; for N = 4 the 4-bit CSA and the
// final 2-bit adder. Which words enter the CSA follows the published 4x4
// arrangement; the ripple-carry adder that resolves the carry-save pair is
// this design's choice for the final addition. Purely combinational.
module vedic_combine #(
  parameter int unsigned N = 32  // product width of the sub-multipliers
) (
  input  logic [N-1:0]   q0,  // aL*bL
  input  logic [N-1:0]   q1,  // aH*bL
  input  logic [N-1:0]   q2,  // aL*bH
  input  logic [N-1:0]   q3,  // aH*bH
  output logic [2*N-1:0] p    // a*b
);
  localparam int unsigned H = N / 2;

  logic [N-1:0] csa_c_in;   // third CSA operand
  logic [N-1:0] csa_sum;
  logic [N-1:0] csa_carry;
  logic [N-1:0] mid_b;      // carry word aligned to the sum word
  logic [N-1:0] mid_sum;
  logic         mid_cout;
  logic [H-1:0] hi_b;
  logic [H-1:0] hi_sum;
  logic         hi_cout;

  always_comb begin
    csa_c_in = {q3[H-1:0], q0[N-1:H]};
    mid_b    = {csa_carry[N-2:0], 1'b0};
    hi_b     = H'(csa_carry[N-1]);
  end

  csa_nbit #(.N(N)) u_csa (
    .a(q1), .b(q2), .c(csa_c_in),
    .sum(csa_sum), .carry(csa_carry)
  );

  rca_nbit #(.N(N)) u_rca_mid (
    .a(csa_sum), .b(mid_b), .cin(1'b0),
    .sum(mid_sum), .cout(mid_cout)
  );

  rca_nbit #(.N(H)) u_rca_hi (
    .a(q3[N-1:H]), .b(hi_b), .cin(mid_cout),
    .sum(hi_sum), .cout(hi_cout)
  );

  always_comb p = {hi_sum, mid_sum, q0[H-1:0]};

  // Holds whenever q0..q3 are the four partial products of one multiplication.
  always_comb begin
    assert (!hi_cout)
      else $error("vedic_combine: carry out of the upper adder");
  end
endmodule
