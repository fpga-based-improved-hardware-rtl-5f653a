// csa_tb: self-checking testbench for the 3:2 carry-save adder (16 bits).
//
// Drives corner words (all zeros, all ones, alternating bits) and random words.
// Checks that sum is the bitwise XOR of the inputs, that the carry word is the
// bitwise majority moved up one place with a zero in bit 0, and that
// sum + carry equals x + y + z modulo 2^16.
module csa_tb;

  localparam int unsigned W = 16;

  logic [W-1:0] x, y, z, sum, carry;

  int checks = 0;
  int failures = 0;

  csa #(.W(W)) dut (.x(x), .y(y), .z(z), .sum(sum), .carry(carry));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("csa_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] xi, yi, zi);
    logic [W-1:0] exp_sum, exp_carry;
    logic [W+1:0] total;
    x = xi; y = yi; z = zi;
    #1;
    for (int i = 0; i < W; i++) begin
      exp_sum[i] = (xi[i] + yi[i] + zi[i]) % 2 == 1;
      exp_carry[i] = (i == 0) ? 1'b0 : (xi[i-1] + yi[i-1] + zi[i-1]) >= 2;
    end
    total = xi + yi + zi;
    checks += 3;
    if (sum !== exp_sum) begin
      failures++;
      $display("csa_tb: x=%h y=%h z=%h sum=%h expected %h", xi, yi, zi, sum, exp_sum);
    end
    if (carry !== exp_carry) begin
      failures++;
      $display("csa_tb: x=%h y=%h z=%h carry=%h expected %h", xi, yi, zi, carry, exp_carry);
    end
    if (W'(sum + carry) !== total[W-1:0]) begin
      failures++;
      $display("csa_tb: x=%h y=%h z=%h sum+carry=%h expected %h",
               xi, yi, zi, W'(sum + carry), total[W-1:0]);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '0);
    apply('1, '1, '0);
    apply(16'hAAAA, 16'h5555, 16'hFFFF);
    apply(16'h8000, 16'h8000, 16'h8000);
    for (int n = 0; n < 5000; n++)
      apply(W'($urandom), W'($urandom), W'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
