// tb_vedic_combine: self-checking test of the partial-product combiner at
// its default width (N = 32, the top level of the 32x32 multiplier) and at
// N = 4. The testbench forms the four partial products of random half-width
// operands with its own multiplication, feeds them in, and compares the
// result with the full product a*b. It also counts how often the two carry
// paths into the upper adder are used (the CSA's top carry bit and the
// carry out of the middle adder), and fails if either never occurs.
module tb_vedic_combine;
  localparam int N = 32;
  localparam int H = N / 2;
  logic [N-1:0]   q0, q1, q2, q3;
  logic [2*N-1:0] p;
  logic [3:0]     r0, r1, r2, r3;
  logic [7:0]     p4;
  int checks = 0, failures = 0;
  int n_top_carry = 0, n_mid_cout = 0;

  vedic_combine dut (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
  vedic_combine #(.N(4)) dut4 (.q0(r0), .q1(r1), .q2(r2), .q3(r3), .p(p4));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [H-1:0] al, input logic [H-1:0] ah,
                       input logic [H-1:0] bl, input logic [H-1:0] bh);
    logic [2*N-1:0] expect_p;
    q0 = N'(al) * N'(bl);
    q1 = N'(ah) * N'(bl);
    q2 = N'(al) * N'(bh);
    q3 = N'(ah) * N'(bh);
    expect_p = (2*N)'({ah, al}) * (2*N)'({bh, bl});
    #1;
    checks++;
    if (dut.csa_carry[N-1]) n_top_carry++;
    if (dut.mid_cout) n_mid_cout++;
    if (p != expect_p) begin
      failures++;
      $display("FAIL %h*%h -> %h expected %h", {ah, al}, {bh, bl}, p, expect_p);
    end
  endtask

  initial begin
    r0 = '0; r1 = '0; r2 = '0; r3 = '0;
    apply('0, '0, '0, '0);
    apply('1, '1, '1, '1);
    apply('1, '0, '0, '1);
    for (int i = 0; i < 20000; i++)
      apply(H'($urandom), H'($urandom), H'($urandom), H'($urandom));
    // N = 4: every pair of 4-bit operands
    for (int i = 0; i < 256; i++) begin
      logic [3:0] a, b;
      {a, b} = 8'(i);
      r0 = 4'(a[1:0] * b[1:0]);
      r1 = 4'(a[3:2] * b[1:0]);
      r2 = 4'(a[1:0] * b[3:2]);
      r3 = 4'(a[3:2] * b[3:2]);
      #1;
      checks++;
      if (p4 != 8'(a) * 8'(b)) begin
        failures++;
        $display("FAIL4 %0d*%0d -> %0d", a, b, p4);
      end
    end
    $display("top CSA carry used %0d times, middle adder carry out %0d times",
             n_top_carry, n_mid_cout);
    checks++;
    if (n_top_carry == 0 || n_mid_cout == 0) begin
      failures++;
      $display("FAIL a carry path into the upper adder was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
