// tb_csa_nbit: self-checking test of the carry-save adder.
// The default 4-bit instance is tested exhaustively over all three
// operands, and a 32-bit instance with random operands. Each bit pair is
// checked against the full-adder rule (sum = parity, carry = majority) and
// the words against a + b + c = sum + 2*carry.
module tb_csa_nbit;
  logic [3:0]  a4, b4, c4, s4, k4;
  logic [31:0] a32, b32, c32, s32, k32;
  int checks = 0, failures = 0;

  csa_nbit dut4 (.a(a4), .b(b4), .c(c4), .sum(s4), .carry(k4));
  csa_nbit #(.N(32)) dut32 (.a(a32), .b(b32), .c(c32), .sum(s32), .carry(k32));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a32 = '0; b32 = '0; c32 = '0;
    for (int i = 0; i < 4096; i++) begin
      {a4, b4, c4} = 12'(i);
      #1;
      checks++;
      if (s4 != (a4 ^ b4 ^ c4) || k4 != ((a4 & b4) | (a4 & c4) | (b4 & c4)) ||
          6'(a4) + 6'(b4) + 6'(c4) != 6'(s4) + (6'(k4) << 1)) begin
        failures++;
        $display("FAIL4 %h %h %h -> s=%h k=%h", a4, b4, c4, s4, k4);
      end
    end
    for (int i = 0; i < 3000; i++) begin
      a32 = $urandom; b32 = $urandom; c32 = $urandom;
      if (i == 0) begin a32 = '1; b32 = '1; c32 = '1; end
      #1;
      checks++;
      if (34'(a32) + 34'(b32) + 34'(c32) != 34'(s32) + (34'(k32) << 1) ||
          s32 != (a32 ^ b32 ^ c32)) begin
        failures++;
        $display("FAIL32 %h %h %h -> s=%h k=%h", a32, b32, c32, s32, k32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
