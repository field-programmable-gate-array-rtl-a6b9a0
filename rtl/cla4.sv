// cla4: 4-bit carry look-ahead adder, the basic building block of the ALU.
//
// Each bit forms a generate g_i = a_i & b_i and a propagate p_i = a_i | b_i.
// The carries into bits 1..3 and the carry-out are expanded directly from the
// carry-in (c1 in the source's 1-based numbering), so no carry ripples
// inside the block:
//   c2 = g1 + p1 c1
//   c3 = g2 + p2 g1 + p2 p1 c1
//   c4 = g3 + p3 g2 + p3 p2 g1 + p3 p2 p1 c1
//   cout = g4 + p4 c4 (same expansion one bit further)
// Sum bits are a_i ^ b_i ^ c_i. The equations follow the source design; the
// block-level generate/propagate outputs are this implementation's addition
// for anyone who wants a second look-ahead level. Purely combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] sum,
  output logic       cout,
  output logic       grp_g,   // block generate
  output logic       grp_p    // block propagate
);
  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = a & b;
    p = a | b;
    c[0] = cin;
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & cin);
    sum   = a ^ b ^ c[3:0];
    cout  = c[4];
    grp_g = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    grp_p = &p;
  end
endmodule
