// alu181_n2: partition N2 of the 74181 ALU/function generator.
//
// N2 receives the four (HI, LI) pairs from the N1 slices plus the mode line
// M and the carry input Cn, and forms all eight ALU outputs. With
// gi = NOT HI (bit generate) and pi = NOT LI (bit propagate):
//   internal carries  c0 = NOT Cn,  c(i+1) = gi + pi.ci   (two-level lookahead)
//   Fi   = HI xor LI xor NOT( M' . ci' )   (in logic mode, M = 1, the carry
//          term is forced to 1 and Fi = HI xnor LI)
//   A=B  = F0.F1.F2.F3
//   P'   = NOT( p0.p1.p2.p3 )                          group propagate, low true
//   G'   = NOT( g3 + p3.g2 + p3.p2.g1 + p3.p2.p1.g0 )  group generate, low true
//   Cn+4 = NOT c4                                      carry out, low true
// The result is the usual active-high-data 74181 behaviour: F = p + g + c0,
// where p and g are the select-dependent operand terms.
//
// The carries are written as flat sum-of-products, as in the part, not as a
// ripple chain. Purely combinational.
module alu181_n2 (
  input  logic [3:0] h,
  input  logic [3:0] l,
  input  logic       m,
  input  logic       cn,
  output logic [3:0] f,
  output logic       aeqb,
  output logic       p_n,
  output logic       cn4,
  output logic       g_n
);

  logic [3:0] g, p;
  logic [4:0] c;

  always_comb begin
    g = ~h;
    p = ~l;
    c[0] = ~cn;
    c[1] = g[0] | (p[0] & c[0]);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & c[0]);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & c[0]);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & c[0]);
    for (int i = 0; i < 4; i++) begin
      f[i] = h[i] ^ l[i] ^ ~(~m & ~c[i]);
    end
    aeqb = &f;
    p_n  = ~(&p);
    g_n  = ~(g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]));
    cn4  = ~c[4];
  end

endmodule
