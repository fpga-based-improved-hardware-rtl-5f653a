// cla_stage_tb: self-checking testbench for the final stage (16 bits).
//
// Drives corner and random triples of words and checks that result equals
// sum5 + carry5 + carry4 modulo 2^16, the value the final 3:2 step and the
// carry-lookahead adder must produce together.
module cla_stage_tb;

  localparam int unsigned W = 16;

  logic [W-1:0] s5, c5, c4, result;

  int checks = 0;
  int failures = 0;

  cla_stage #(.W(W)) dut (.sum5(s5), .carry5(c5), .carry4(c4), .result(result));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("cla_stage_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] x, y, z);
    logic [W+1:0] total;
    s5 = x; c5 = y; c4 = z;
    #1;
    total = x + y + z;
    checks++;
    if (result !== total[W-1:0]) begin
      failures++;
      $display("cla_stage_tb: %h + %h + %h = %h, expected %h", x, y, z, result, total[W-1:0]);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, 16'h0001, '0);
    apply('0, '0, 16'h0001);
    apply('1, '1, '1);
    apply(16'h7FFF, 16'h0001, 16'h8000);
    for (int n = 0; n < 10000; n++)
      apply(W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
