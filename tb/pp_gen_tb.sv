// pp_gen_tb: self-checking testbench for pp_gen at the default 8-bit size.
//
// Applies every pair of 8-bit operands. For each pair it checks every partial
// product against a reference formed here (multiplicand shifted by i when
// multiplier bit i is set) and checks that the eight partial products add up
// to the product a * b. A watchdog ends the run with a failure if the sweep
// does not finish in time.
module pp_gen_tb;

  localparam int unsigned N = 8;

  logic [N-1:0]          a, b;
  logic [N-1:0][2*N-1:0] pp;

  int checks = 0;
  int failures = 0;

  pp_gen #(.N(N)) dut (.a(a), .b(b), .pp(pp));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("pp_gen_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << N); ia++) begin
      for (int ib = 0; ib < (1 << N); ib++) begin
        logic [2*N-1:0] total;
        a = N'(ia);
        b = N'(ib);
        #1;
        total = '0;
        for (int i = 0; i < N; i++) begin
          int unsigned expect_pp;
          expect_pp = ((ia >> i) & 1) != 0 ? (ib * (1 << i)) : 0;
          checks++;
          if (pp[i] !== (2*N)'(expect_pp)) begin
            failures++;
            if (failures < 10)
              $display("pp_gen_tb: a=%0d b=%0d pp[%0d]=%0d expected %0d",
                       ia, ib, i, pp[i], expect_pp);
          end
          total += pp[i];
        end
        checks++;
        if (total !== (2*N)'(ia * ib)) begin
          failures++;
          if (failures < 10)
            $display("pp_gen_tb: a=%0d b=%0d sum of partial products %0d", ia, ib, total);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
