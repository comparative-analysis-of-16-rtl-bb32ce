// cla_adder: two-level carry look-ahead adder.
//
// Adds two W-bit words. Bits are split into 4-bit groups. Each bit forms
// propagate p = a ^ b and generate g = a & b; inside a group every carry is
// written out as a sum of products of the group's p and g and the group's
// carry-in, so no carry ripples from bit to bit. Each group also forms a group
// generate G and group propagate P, and a second look-ahead level gives every
// group's carry-in as a sum of products of the lower groups' G and P. The
// document names a carry look-ahead adder as the final adder; the 4-bit group
// size and the two-level arrangement are this design's choice.
// The sum is taken modulo 2**W: every use in the multiplier is sized so that
// the true result fits, and no carry out is produced.
// Purely combinational.
module cla_adder #(
  parameter int W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);

  localparam int NG = (W + 3) / 4;   // number of 4-bit groups
  localparam int WP = 4 * NG;        // width padded to whole groups

  logic [WP-1:0] ap, bp, p, g, c, s;
  logic [NG-1:0] gg, gp;             // group generate / propagate
  logic [NG-1:0] gc;                 // carry into each group

  always_comb begin
    ap = WP'(a);
    bp = WP'(b);
    p  = ap ^ bp;
    g  = ap & bp;

    // group generate and propagate
    for (int k = 0; k < NG; k++) begin
      gp[k] = p[4*k] & p[4*k+1] & p[4*k+2] & p[4*k+3];
      gg[k] = g[4*k+3]
            | (p[4*k+3] & g[4*k+2])
            | (p[4*k+3] & p[4*k+2] & g[4*k+1])
            | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
    end

    // second level: carry into group k = OR over j<k of G[j] & P[j+1..k-1]
    for (int k = 0; k < NG; k++) begin
      logic term;
      gc[k] = 1'b0;
      for (int j = 0; j < k; j++) begin
        term = gg[j];
        for (int l = j + 1; l < k; l++) term = term & gp[l];
        gc[k] = gc[k] | term;
      end
    end

    // first level: carries inside each group from the group carry-in
    for (int k = 0; k < NG; k++) begin
      c[4*k]   = gc[k];
      c[4*k+1] = g[4*k] | (p[4*k] & gc[k]);
      c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k]) | (p[4*k+1] & p[4*k] & gc[k]);
      c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1]) | (p[4*k+2] & p[4*k+1] & g[4*k])
               | (p[4*k+2] & p[4*k+1] & p[4*k] & gc[k]);
    end

    s   = p ^ c;
    sum = s[W-1:0];
  end

endmodule
