// tb_vedic_mul_2x2: exhaustive self-checking test of the 2x2 multiplier.
// All sixteen operand pairs are applied and the product is compared with
// the integer product. The design is combinational, so the product is
// checked one time step after the operands change. Watchdog included.
module tb_vedic_mul_2x2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic_mul_2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (p != 4'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d*%0d -> %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
