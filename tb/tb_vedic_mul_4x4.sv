// tb_vedic_mul_4x4: self-checking test of the 4x4 Vedic multiplier.
// Applies every pair of 4-bit operands (256 products), and compares the product with the
// integer product computed by the testbench. The multiplier is
// combinational: the result is checked one time step after the operands
// change. It also counts how often the carry out of the middle adder of
// the top combining stage reaches the upper adder, and fails if never.
module tb_vedic_mul_4x4;
  logic [3:0]  a, b;
  logic [7:0]  p;
  int checks = 0, failures = 0;
  int n_mid_cout = 0;

  vedic_mul_4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [3:0] x, input logic [3:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (dut.u_comb.mid_cout) n_mid_cout++;
    if (p != 8'(x) * 8'(y)) begin
      failures++;
      $display("FAIL %0d*%0d -> %0d", x, y, p);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 1);
    apply(1, '1);
    for (int i = 0; i < 256; i++) apply(4'(i >> 4), 4'(i));
    checks++;
    if (n_mid_cout == 0) begin
      failures++;
      $display("FAIL middle adder carry never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
