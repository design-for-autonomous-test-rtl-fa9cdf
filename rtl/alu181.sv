// alu181: the 4-bit 74181 ALU/function generator, built from its two
// partitions: four identical N1 slices and the carry/sum block N2.
//
// Data are active high. M = 1 selects the 16 logic functions of A and B,
// M = 0 the 16 arithmetic functions; Cn and Cn+4 are active-low carries
// (Cn = 1 means no carry in). F = A=B when all four F outputs are high.
// The split into N1 and N2 is the partition used by the self test: every
// N1 output depends on only four inputs and N2 sees only three of the four
// possible (HI, LI) combinations, so both can be tested exhaustively with
// few patterns. Purely combinational.
module alu181 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] s,
  input  logic       m,
  input  logic       cn,
  output logic [3:0] f,
  output logic       aeqb,
  output logic       p_n,
  output logic       cn4,
  output logic       g_n
);

  logic [3:0] h, l;

  for (genvar i = 0; i < 4; i++) begin : g_n1
    alu181_n1 u_n1 (.a(a[i]), .b(b[i]), .s(s), .h(h[i]), .l(l[i]));
  end

  alu181_n2 u_n2 (
    .h(h), .l(l), .m(m), .cn(cn),
    .f(f), .aeqb(aeqb), .p_n(p_n), .cn4(cn4), .g_n(g_n)
  );

endmodule
