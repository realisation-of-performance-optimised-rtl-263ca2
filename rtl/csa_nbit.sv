// csa_nbit: N-bit carry-save adder (3:2 compressor).
// N independent full adders, one per bit position, with no carry chain
// between them. Three N-bit operands a, b, c become two words,
//   sum[i]   = (a[i] + b[i] + c[i]) mod 2
//   carry[i] = (a[i] + b[i] + c[i] - sum[i]) / 2, of weight 2^(i+1),
// so that a + b + c = sum + 2*carry. The delay is one full adder whatever
// N is. Purely combinational. Default width 4, as in the 4x4 multiplier.
module csa_nbit #(
  parameter int unsigned N = 4  // operand width
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] sum,
  output logic [N-1:0] carry  // bit i has weight 2^(i+1)
);
  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .x(a[i]), .y(b[i]), .z(c[i]),
      .s(sum[i]), .c(carry[i])
    );
  end
endmodule
