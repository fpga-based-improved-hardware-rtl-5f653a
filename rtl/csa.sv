// csa: 3:2 carry-save adder, the building block of the Wallace tree.
//
// Three W-bit words x, y, z are reduced to two words without propagating any
// carry: sum is the bitwise XOR of the three inputs and the carry word is the
// bitwise majority of the three, moved one place to the left so that
// sum + carry == x + y + z (modulo 2^W). The carry out of the top bit is
// dropped; in the multiplier every word is 2N bits wide and the final
// product fits in 2N bits, so nothing of the result is lost.
//
// Interface: x, y, z in; sum and carry (already shifted, carry[0] = 0) out.
// Timing: combinational, one full-adder delay, independent of W.
//
// XOR sum and majority carry shifted left by one follow the design; the single
// width W for all words is this implementation's choice.
module csa #(
  parameter int unsigned W = bw_pkg::PROD_W
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Majority of the three inputs, for every bit but the top one, whose
  // carry would leave the word.
  logic [W-2:0] maj;

  always_comb begin
    sum   = x ^ y ^ z;
    maj   = (x[W-2:0] & y[W-2:0]) | (x[W-2:0] & z[W-2:0]) | (y[W-2:0] & z[W-2:0]);
    carry = {maj, 1'b0};
  end

endmodule
