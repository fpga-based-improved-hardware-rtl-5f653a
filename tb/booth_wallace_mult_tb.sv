// booth_wallace_mult_tb: end-to-end testbench of the 8 x 8 multiplier at its
// default parameters.
//
// Applies all 65,536 operand pairs and compares result with a * b computed
// here. It also counts how often the parts of the tree that can be idle for
// some operands actually carried information, and counts a failure for any
// that never did:
//   - the carry4 word that bypasses CSA_5 straight to the final stage,
//   - a carry word leaving the tree for the final adder (carry5 non-zero),
//   - the final adder propagating a carry across a 4-bit group boundary,
//   - the largest product, 255 * 255.
module booth_wallace_mult_tb;

  localparam int unsigned N = 8;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] result;

  int checks = 0;
  int failures = 0;
  int n_carry4_bypass = 0;
  int n_carry5 = 0;
  int n_group_carry = 0;
  int n_max = 0;

  booth_wallace_mult dut (.a(a), .b(b), .result(result));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("booth_wallace_mult_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        a = N'(ia);
        b = N'(ib);
        #1;
        checks++;
        if (result !== (2*N)'(ia * ib)) begin
          failures++;
          if (failures < 10)
            $display("booth_wallace_mult_tb: %0d * %0d = %0d, expected %0d",
                     ia, ib, result, ia * ib);
        end
        if (dut.carry4 != '0) n_carry4_bypass++;
        if (dut.carry5 != '0) n_carry5++;
        if (dut.u_cla_stage.u_cla.gc[3:1] != '0) n_group_carry++;
        if (ia == 255 && ib == 255) n_max++;
      end
    end
    $display("booth_wallace_mult_tb: carry4 bypass used %0d, carry5 non-zero %0d, group carries %0d, max product %0d",
             n_carry4_bypass, n_carry5, n_group_carry, n_max);
    checks += 4;
    if (n_carry4_bypass == 0) failures++;
    if (n_carry5 == 0) failures++;
    if (n_group_carry == 0) failures++;
    if (n_max == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
