// pp_gen: partial product generator of the Booth-Wallace multiplier.
//
// For an N x N unsigned multiplication it forms N partial products, all at
// once: partial product i is the multiplicand shifted left by i bit positions
// when bit i of the multiplier is 1, and zero otherwise. Each partial product
// is delivered already aligned in a 2N-bit word, so the reduction tree that
// follows adds the words as they are. The sum of the N words is a * b.
//
// Interface: a is the multiplier (A0..A7 at the default size), b the
// multiplicand (B0..B7); pp[i] is partial product Di.
// Timing: purely combinational, no clock.
// Bits of pp[i] below position i and above position i+N-1 are always zero;
// they are kept so that every word of the tree has the same width.
//
// The selection rule (zero, or the shifted multiplicand, chosen by one
// multiplier bit) and the count of eight partial products follow the design.
// Treating the operands as unsigned is this implementation's choice.
module pp_gen #(
  parameter int unsigned N = bw_pkg::MULT_N
) (
  input  logic [N-1:0]            a,   // multiplier
  input  logic [N-1:0]            b,   // multiplicand
  output logic [N-1:0][2*N-1:0]   pp   // pp[i] = a[i] ? b << i : 0
);

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      if (a[i]) pp[i] = {{N{1'b0}}, b} << i;
      else      pp[i] = '0;
    end
  end

endmodule
