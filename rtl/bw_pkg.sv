// bw_pkg: constants shared by the Booth-Wallace multiplier modules.
//
// MULT_N is the operand width of the multiplier core (8, an 8x8 core with a
// 16-bit result). Every module takes its width as a parameter whose default
// comes from here, so the core can be rebuilt at another size in one place.
package bw_pkg;

  // Operand width of the multiplier core: 8-bit multiplier, 8-bit multiplicand.
  localparam int unsigned MULT_N = 8;

  // Width of the product and of every internal word of the reduction tree.
  localparam int unsigned PROD_W = 2 * MULT_N;

endpackage
