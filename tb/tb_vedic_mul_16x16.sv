// tb_vedic_mul_16x16: self-checking test of the 16x16 Vedic multiplier.
// Applies corner operands, the worked decimal example 28 x 64 and 100000 random pairs, and compares the product with the
// integer product computed by the testbench. The multiplier is
// combinational: the result is checked one time step after the operands
// change. It also counts how often the carry out of the middle adder of
// the top combining stage reaches the upper adder, and fails if never.
module tb_vedic_mul_16x16;
  logic [15:0]  a, b;
  logic [31:0]  p;
  int checks = 0, failures = 0;
  int n_mid_cout = 0;

  vedic_mul_16x16 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (dut.u_comb.mid_cout) n_mid_cout++;
    if (p != 32'(x) * 32'(y)) begin
      failures++;
      $display("FAIL %0d*%0d -> %0d", x, y, p);
    end
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 1);
    apply(1, '1);
    apply(16'd28, 16'd64);  // the worked example 28 x 64 = 1792
    for (int i = 0; i < 100000; i++) apply(16'($urandom), 16'($urandom));
    checks++;
    if (n_mid_cout == 0) begin
      failures++;
      $display("FAIL middle adder carry never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
