// tb_full_adder: exhaustive self-checking test of full_adder.
// All eight input combinations are applied; {carry, sum} is compared with
// the integer x + y + z. A watchdog ends the run with a failure if it hangs.
module tb_full_adder;
  logic x, y, z, s, c;
  int checks = 0, failures = 0;

  full_adder dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, z} = 3'(i);
      #1;
      checks++;
      if ({c, s} != 2'(int'(x) + int'(y) + int'(z))) begin
        failures++;
        $display("FAIL x=%0d y=%0d z=%0d -> c=%0d s=%0d", x, y, z, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
