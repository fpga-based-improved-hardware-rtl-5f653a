// cla_adder: two-operand carry-lookahead adder, the carry-propagate adder
// that turns the carry-save output of the Wallace tree into the product.
//
// How it works: every bit position i produces a generate g[i] = a & b and a
// propagate p[i] = a ^ b. The word is cut into groups of GROUP bits. Each
// group forms a group generate G and group propagate P. The carry into every
// group is then computed directly from the G/P of the groups below it and
// cin, as an OR of AND terms (second lookahead level), and the carry into
// every bit inside a group is computed the same way from the bit g/p and the
// group's carry-in (first lookahead level). No carry ripples from bit to bit
// or from group to group.
//
// Interface: a, b, cin in; s = low W bits of a + b + cin, cout = carry out.
// Timing: combinational; the depth is set by the two lookahead levels, not by W.
//
// That a carry-lookahead adder ends the multiplier follows the design; the
// two-level structure and the group size of 4 are this implementation's choice.
module cla_adder #(
  parameter int unsigned W     = bw_pkg::PROD_W,
  parameter int unsigned GROUP = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NG = (W + GROUP - 1) / GROUP;   // number of groups

  logic [W-1:0]  g, p;      // bit generate / propagate
  logic [NG-1:0] gg, gp;    // group generate / propagate
  logic [NG:0]   gc;        // carry into each group, gc[NG] = carry out
  logic [W:0]    c;         // carry into each bit

  // Bit generate and propagate.
  always_comb begin
    g = a & b;
    p = a ^ b;
  end

  // Group generate / propagate, as sums of products over the group's bits:
  // G = OR over j of ( g[j] AND p[j+1] AND ... AND p[top] ), P = AND of p.
  always_comb begin
    for (int unsigned k = 0; k < NG; k++) begin
      logic term;
      gg[k] = 1'b0;
      gp[k] = 1'b1;
      for (int unsigned j = k * GROUP; j < (k + 1) * GROUP && j < W; j++) begin
        gp[k] = gp[k] & p[j];
        term  = g[j];
        for (int unsigned m = j + 1; m < (k + 1) * GROUP && m < W; m++)
          term = term & p[m];
        gg[k] = gg[k] | term;
      end
    end
  end

  // Second level: carry into group k from cin and the groups below it.
  always_comb begin
    for (int unsigned k = 0; k <= NG; k++) begin
      logic term;
      term = cin;
      for (int unsigned m = 0; m < k; m++) term = term & gp[m];
      gc[k] = term;
      for (int unsigned j = 0; j < k; j++) begin
        term = gg[j];
        for (int unsigned m = j + 1; m < k; m++) term = term & gp[m];
        gc[k] = gc[k] | term;
      end
    end
  end

  // First level: carry into each bit from its group's carry-in and the bits
  // below it in the same group.
  always_comb begin
    for (int unsigned i = 0; i < W; i++) begin
      int unsigned base;
      logic        term;
      base = (i / GROUP) * GROUP;
      term = gc[i / GROUP];
      for (int unsigned m = base; m < i; m++) term = term & p[m];
      c[i] = term;
      for (int unsigned j = base; j < i; j++) begin
        term = g[j];
        for (int unsigned m = j + 1; m < i; m++) term = term & p[m];
        c[i] = c[i] | term;
      end
    end
    c[W] = gc[NG];
  end

  always_comb begin
    s    = p ^ c[W-1:0];
    cout = c[W];
  end

endmodule
