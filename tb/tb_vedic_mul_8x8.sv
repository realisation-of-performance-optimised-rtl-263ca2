// tb_vedic_mul_8x8: self-checking test of the 8x8 Vedic multiplier.
// Applies every pair of 8-bit operands (65536 products), and compares the product with the
// integer product computed by the testbench. The multiplier is
// combinational: the result is checked one time step after the operands
// change. It also counts how often the carry out of the middle adder of
// the top combining stage reaches the upper adder, and fails if never.
module tb_vedic_mul_8x8;
  logic [7:0]  a, b;
  logic [15:0]  p;
  int checks = 0, failures = 0;
  int n_mid_cout = 0;

  vedic_mul_8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [7:0] x, input logic [7:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (dut.u_comb.mid_cout) n_mid_cout++;
    if (p != 16'(x) * 16'(y)) begin
      failures++;
      $display("FAIL %0d*%0d -> %0d", x, y, p);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 1);
    apply(1, '1);
    for (int i = 0; i < 65536; i++) apply(8'(i >> 8), 8'(i));
    checks++;
    if (n_mid_cout == 0) begin
      failures++;
      $display("FAIL middle adder carry never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
