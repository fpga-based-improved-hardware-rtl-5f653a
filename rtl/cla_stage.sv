// cla_stage: final stage of the Booth-Wallace multiplier (the block that
// produces the 16-bit RESULT at the default size).
//
// The Wallace tree leaves three words: sum5 and carry5 from the last CSA and
// carry4, which bypasses that CSA. This stage first reduces the three words
// to two with one more 3:2 carry-save step (sum6 and its carry word) and then
// adds those two with the carry-lookahead adder. Only this last addition
// propagates carries.
//
// Interface: sum5, carry5, carry4 in (2N bits each); result out (2N bits),
// equal to sum5 + carry5 + carry4 modulo 2^(2N).
// Timing: combinational.
//
// The three inputs and the final 3:2 step follow the design; the adder's
// insides are those of cla_adder.
module cla_stage #(
  parameter int unsigned W = bw_pkg::PROD_W
) (
  input  logic [W-1:0] sum5,
  input  logic [W-1:0] carry5,
  input  logic [W-1:0] carry4,
  output logic [W-1:0] result
);

  logic [W-1:0] sum6, carry6;
  logic         cout_unused;

  csa #(.W(W)) u_csa6 (
    .x(sum5), .y(carry5), .z(carry4), .sum(sum6), .carry(carry6)
  );

  // The product fits in W bits, so the adder's carry out is never set for a
  // valid multiplication and is left unconnected on purpose.
  cla_adder #(.W(W)) u_cla (
    .a(sum6), .b(carry6), .cin(1'b0), .s(result), .cout(cout_unused)
  );

endmodule
