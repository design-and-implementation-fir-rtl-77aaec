// cla_adder: two-level carry-lookahead adder, sum = a + b + cin.
//
// Bits are grouped by four. Inside a group each carry is computed directly
// from the bit generate (g = a&b) and propagate (p = a^b) signals and the
// group's carry in; each group also produces a group generate G and group
// propagate P. The second level computes every group carry in from the G/P
// of the groups below it and cin, so no carry ripples through a group.
// Combinational. The adder is named, not detailed, in the filter description;
// the 4-bit grouping is this design's choice. W need not be a multiple of 4:
// the top group is padded with zeros.
module cla_adder #(
  parameter int W = 36
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int NG = (W + 3) / 4;   // number of 4-bit groups
  localparam int WP = NG * 4;        // padded width

  logic [WP-1:0] ap, bp, g, p;
  logic [WP:0]   c;                  // carry into each bit, c[WP] out of the top
  logic [NG-1:0] gg, gp;             // group generate / propagate
  logic [NG:0]   gc;                 // carry into each group

  always_comb begin
    ap = WP'(a);
    bp = WP'(b);
    g  = ap & bp;
    p  = ap ^ bp;

    // group generate / propagate
    for (int k = 0; k < NG; k++) begin
      gp[k] = &p[4*k +: 4];
      gg[k] = g[4*k+3]
            | (p[4*k+3] & g[4*k+2])
            | (p[4*k+3] & p[4*k+2] & g[4*k+1])
            | (p[4*k+3] & p[4*k+2] & p[4*k+1] & g[4*k]);
    end

    // second level: group carries as sums of products of G/P terms
    gc[0] = cin;
    for (int k = 1; k <= NG; k++) begin
      logic term;
      gc[k] = 1'b0;
      for (int j = 0; j < k; j++) begin
        term = gg[j];
        for (int i = j + 1; i < k; i++) term = term & gp[i];
        gc[k] = gc[k] | term;
      end
      term = cin;
      for (int i = 0; i < k; i++) term = term & gp[i];
      gc[k] = gc[k] | term;
    end

    // first level: carries inside each group from its carry in
    for (int k = 0; k < NG; k++) begin
      c[4*k]   = gc[k];
      c[4*k+1] = g[4*k]   | (p[4*k]   & gc[k]);
      c[4*k+2] = g[4*k+1] | (p[4*k+1] & g[4*k])
               | (p[4*k+1] & p[4*k]   & gc[k]);
      c[4*k+3] = g[4*k+2] | (p[4*k+2] & g[4*k+1])
               | (p[4*k+2] & p[4*k+1] & g[4*k])
               | (p[4*k+2] & p[4*k+1] & p[4*k] & gc[k]);
    end

    c[WP] = gc[NG];
    sum   = W'(p ^ c[WP-1:0]);
    cout  = c[W];
  end

endmodule
