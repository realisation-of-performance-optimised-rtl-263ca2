// rca_nbit: N-bit ripple-carry adder.
// A chain of N full adders; the carry out of each stage is the carry in of
// the next, so the result settles after N full-adder delays. In the
// multiplier it resolves the carry-save pair of each combining stage and
// adds the carries into the top quarter of the product. Purely
// combinational. The default width of 4 is that of the textbook example
// the structure follows.
module rca_nbit #(
  parameter int unsigned N = 4  // operand width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,   // carry into bit 0
  output logic [N-1:0] sum,
  output logic         cout   // carry out of bit N-1
);
  logic [N:0] carry;

  always_comb carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .x(a[i]), .y(b[i]), .z(carry[i]),
      .s(sum[i]), .c(carry[i+1])
    );
  end

  always_comb cout = carry[N];
endmodule
