// laca4: 4-bit look-ahead carry adder (LACA) slice.
//
// Each bit forms a generate g = a & b and a propagate p = a ^ b. All four
// carries are formed at once from g, p and the carry-in by the two-level
// look-ahead equations, so no carry ripples through the slice. Besides the
// sum the slice gives its carry-out and its group generate / propagate.
// Purely combinational. The look-ahead principle is the document's; the
// equations are the textbook ones.
module laca4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout,
  output logic       gg,   // group generate
  output logic       gp    // group propagate
);
  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = a & b;
    p = a ^ b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gp   = &p;
    c[4] = gg | (gp & cin);
    s    = p ^ c[3:0];
    cout = c[4];
  end
endmodule
