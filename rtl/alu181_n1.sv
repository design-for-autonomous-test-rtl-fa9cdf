// alu181_n1: one bit slice N1 of the 74181 ALU/function generator.
//
// The slice turns the operand bits AI, BI and the four select lines into
// the two internal lines that feed the carry/sum block N2:
//   HI = NOT( AI.BI'.S2 + AI.BI.S3 )     depends on AI, BI, S2, S3 only
//   LI = NOT( AI + BI.S0 + BI'.S1 )       depends on AI, BI, S0, S1 only
// (BI' is the complement of BI). HI is the complement of the bit's generate
// term and LI the complement of its propagate term; since generate implies
// propagate, (HI, LI) only ever takes the values 11, 10 and 00.
//
// These are the equations of the standard 74181 gate network; which line is
// called HI and which LI follows the partition description (HI uses S2/S3,
// LI uses S0/S1). Purely combinational.
module alu181_n1 (
  input  logic       a,
  input  logic       b,
  input  logic [3:0] s,
  output logic       h,
  output logic       l
);

  always_comb begin
    h = ~((a & ~b & s[2]) | (a & b & s[3]));
    l = ~(a | (b & s[0]) | (~b & s[1]));
  end

endmodule
