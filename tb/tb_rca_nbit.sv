// tb_rca_nbit: self-checking test of the ripple-carry adder.
// The default 4-bit adder is tested exhaustively (all a, b and carry-in),
// and a 16-bit instance with random operands plus the full-length carry
// ripple (all ones + 1). {cout, sum} is compared with integer addition.
module tb_rca_nbit;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  int checks = 0, failures = 0;

  rca_nbit dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  rca_nbit #(.N(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic ci);
    a16 = x; b16 = y; ci16 = ci;
    #1;
    checks++;
    if ({co16, s16} != 17'(x) + 17'(y) + 17'(ci)) begin
      failures++;
      $display("FAIL16 %h+%h+%0d -> %0d %h", x, y, ci, co16, s16);
    end
  endtask

  initial begin
    a16 = '0; b16 = '0; ci16 = 1'b0;
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} != 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL4 %0d+%0d+%0d -> %0d %0d", a4, b4, ci4, co4, s4);
      end
    end
    check16(16'hffff, 16'h0000, 1'b1);
    check16(16'hffff, 16'hffff, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    for (int i = 0; i < 2000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
