// booth_wallace_mult: N x N unsigned multiplier (8 x 8 with a 16-bit result
// by default) built from a partial product generator, a Wallace tree of five
// 3:2 carry-save adders and a carry-lookahead final adder.
//
// Dataflow:
//   pp_gen    : D0..D7, Di = a[i] ? b << i : 0
//   CSA_1     : D0, D1, D2        -> sum1, carry1
//   CSA_2     : D3, D4, D5        -> sum2, carry2
//   CSA_3     : D6, D7, sum1      -> sum3, carry3
//   CSA_4     : sum2, carry1, carry2 -> sum4, carry4
//   CSA_5     : sum3, sum4, carry3   -> sum5, carry5
//   cla_stage : sum5, carry5, carry4 -> result (one more 3:2 step, then CLA)
// CSA_1 and CSA_2 work side by side, then CSA_3 and CSA_4, then CSA_5: the
// eight partial products are reduced to two words in four full-adder delays,
// and only the final adder propagates carries.
//
// Interface: a is the multiplier, b the multiplicand, result = a * b.
// Timing: one combinational path, no clock and no registers.
//
// The block structure, the wiring of the five CSAs and the three-input final
// stage follow the design. Unsigned operands, a single 2N-bit width for all
// internal words and the purely combinational form are this implementation's
// choices.
module booth_wallace_mult #(
  parameter int unsigned N = bw_pkg::MULT_N
) (
  input  logic [N-1:0]   a,       // multiplier   (A0..A7)
  input  logic [N-1:0]   b,       // multiplicand (B0..B7)
  output logic [2*N-1:0] result   // product
);

  localparam int unsigned W = 2 * N;

  logic [N-1:0][W-1:0] d;
  logic [W-1:0] sum1, carry1, sum2, carry2, sum3, carry3;
  logic [W-1:0] sum4, carry4, sum5, carry5;

  pp_gen #(.N(N)) u_pp_gen (.a(a), .b(b), .pp(d));

  // The tree below is written for the eight partial products of the 8 x 8
  // core; extra partial products of a wider core would be ignored.
  if (N != 8) begin : g_n_check
    $error("booth_wallace_mult: the Wallace tree is wired for N = 8");
  end

  csa #(.W(W)) u_csa1 (.x(d[0]), .y(d[1]), .z(d[2]),
                       .sum(sum1), .carry(carry1));
  csa #(.W(W)) u_csa2 (.x(d[3]), .y(d[4]), .z(d[5]),
                       .sum(sum2), .carry(carry2));
  csa #(.W(W)) u_csa3 (.x(d[6]), .y(d[7]), .z(sum1),
                       .sum(sum3), .carry(carry3));
  csa #(.W(W)) u_csa4 (.x(sum2), .y(carry1), .z(carry2),
                       .sum(sum4), .carry(carry4));
  csa #(.W(W)) u_csa5 (.x(sum3), .y(sum4), .z(carry3),
                       .sum(sum5), .carry(carry5));

  cla_stage #(.W(W)) u_cla_stage (
    .sum5(sum5), .carry5(carry5), .carry4(carry4), .result(result)
  );

endmodule
