// tb_vedic_mul_32x32: end-to-end self-checking test of the 32x32 Vedic
// multiplier at its only (full) size.
// Stimulus: corner operands (zero, one, all ones, alternating patterns,
// single set bits), the worked decimal example 28 x 64 = 1792, and 200000
// random pairs; every product is compared with the testbench's own 64-bit
// multiplication one time step after the operands change (the design is
// combinational, zero cycles of latency).
// Mechanism coverage: at each of the four combining levels (32, 16, 8 and
// 4 bits, along the high-high path of the tree) it counts how often the
// CSA's top carry bit and the middle adder's carry out feed the upper
// adder, and counts a failure for any that never happens.
module tb_vedic_mul_32x32;
  logic [31:0] a, b;
  logic [63:0] p;
  int checks = 0, failures = 0;
  int n_top[4];   // csa_carry[N-1] set, per level 32/16/8/4
  int n_mid[4];   // mid_cout set, per level 32/16/8/4

  vedic_mul_32x32 dut (.a(a), .b(b), .p(p));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] x, input logic [31:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (dut.u_comb.csa_carry[31])                        n_top[0]++;
    if (dut.u_comb.mid_cout)                             n_mid[0]++;
    if (dut.u_hh.u_comb.csa_carry[15])                   n_top[1]++;
    if (dut.u_hh.u_comb.mid_cout)                        n_mid[1]++;
    if (dut.u_hh.u_hh.u_comb.csa_carry[7])               n_top[2]++;
    if (dut.u_hh.u_hh.u_comb.mid_cout)                   n_mid[2]++;
    if (dut.u_hh.u_hh.u_hh.u_comb.csa_carry[3])          n_top[3]++;
    if (dut.u_hh.u_hh.u_hh.u_comb.mid_cout)              n_mid[3]++;
    if (p != 64'(x) * 64'(y)) begin
      failures++;
      $display("FAIL %h*%h -> %h expected %h", x, y, p, 64'(x) * 64'(y));
    end
  endtask

  initial begin
    foreach (n_top[i]) begin n_top[i] = 0; n_mid[i] = 0; end
    apply(32'd0, 32'd0);
    apply(32'hffff_ffff, 32'hffff_ffff);
    apply(32'hffff_ffff, 32'd1);
    apply(32'hffff_ffff, 32'd0);
    apply(32'haaaa_aaaa, 32'h5555_5555);
    apply(32'h5555_5555, 32'h5555_5555);
    apply(32'hffff_0000, 32'h0000_ffff);
    apply(32'd28, 32'd64);
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j += 7) apply(32'd1 << i, 32'hffff_ffff >> j);
    for (int i = 0; i < 200000; i++) apply($urandom, $urandom);
    for (int l = 0; l < 4; l++) begin
      $display("level %0d-bit: CSA top carry %0d, middle adder carry out %0d",
               32 >> l, n_top[l], n_mid[l]);
      checks++;
      if (n_top[l] == 0 || n_mid[l] == 0) begin
        failures++;
        $display("FAIL a carry path of the %0d-bit level was never exercised", 32 >> l);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
