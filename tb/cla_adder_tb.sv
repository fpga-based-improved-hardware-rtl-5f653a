// cla_adder_tb: self-checking testbench for the carry-lookahead adder.
//
// Runs the default 16-bit adder on corner cases that make a carry travel
// through every group (all-ones plus one, alternating patterns, carry-in
// only) and on random operands with random carry-in, comparing {cout, s}
// with a + b + cin computed here. A second instance, 10 bits wide with
// 3-bit groups, checks a width that is not a multiple of the group size.
module cla_adder_tb;

  localparam int unsigned W  = 16;
  localparam int unsigned W2 = 10;

  logic [W-1:0]  a, b, s;
  logic          cin, cout;
  logic [W2-1:0] a2, b2, s2;
  logic          cout2;

  int checks = 0;
  int failures = 0;

  cla_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));
  cla_adder #(.W(W2), .GROUP(3)) dut2 (.a(a2), .b(b2), .cin(cin), .s(s2), .cout(cout2));

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("cla_adder_tb: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ai, bi, input logic ci);
    logic [W:0]  total;
    logic [W2:0] total2;
    a = ai; b = bi; cin = ci;
    a2 = ai[W2-1:0]; b2 = bi[W2-1:0];
    #1;
    total  = {1'b0, ai} + {1'b0, bi} + {{W{1'b0}}, ci};
    total2 = {1'b0, ai[W2-1:0]} + {1'b0, bi[W2-1:0]} + {{W2{1'b0}}, ci};
    checks += 2;
    if ({cout, s} !== total) begin
      failures++;
      $display("cla_adder_tb: %h + %h + %0d = %h, expected %h", ai, bi, ci, {cout, s}, total);
    end
    if ({cout2, s2} !== total2) begin
      failures++;
      $display("cla_adder_tb: (10 bit) %h + %h + %0d = %h, expected %h",
               a2, b2, ci, {cout2, s2}, total2);
    end
  endtask

  initial begin
    apply('0, '0, 1'b0);
    apply('0, '0, 1'b1);
    apply('1, '0, 1'b1);
    apply('1, 16'h0001, 1'b0);
    apply('1, '1, 1'b1);
    apply(16'hAAAA, 16'h5555, 1'b1);
    apply(16'h0FFF, 16'h0001, 1'b0);
    apply(16'h00F0, 16'h0010, 1'b0);
    for (int n = 0; n < 10000; n++)
      apply(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
