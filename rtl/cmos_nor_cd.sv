// cmos_nor_cd: behavioural switch-level model of a CMOS two-input NOR gate
// with a C/D (charge/discharge) tester transistor. This is a behavioural
// model of a transistor-level cell, not synthesizable logic.
//
// The gate has two series p-channel pull-up transistors, (1) on A and (2)
// on B, and two parallel n-channel pull-down transistors, (3) on A and (4)
// on B. A fifth transistor, gated by TEST, connects the output to the C/D
// line. FAULT selects one transistor as stuck open (0 = fault free, 1..4 =
// transistor (1)..(4)). When neither network conducts, the output node
// keeps its previous charge, which is why a stuck-open fault turns the
// combinational gate into a sequential one.
//
// C/D test procedure: after each test pattern, pulse TEST high with C/D at
// the complement of the expected output, then release TEST. A good gate
// drives the output back to the correct value; a gate whose conducting
// path is open keeps the forced value, so the fault shows regardless of the
// order of the patterns. While TEST is high the C/D line is assumed to
// overpower the gate, as the description requires of the charging drive.
//
// The retained charge is modelled with always_latch, so tools report a
// latch on out: that latch is the stored node charge this model exists to
// represent. Transistor numbering and structure follow the NOR cell and
// its tester; the strength rule while TEST is high is this model's choice.
module cmos_nor_cd #(
  parameter int unsigned FAULT = 0
) (
  input  logic a,
  input  logic b,
  input  logic test,
  input  logic cd,
  output logic out
);

  logic pull_up, pull_down;

  always_comb begin
    pull_up   = ~a & ~b & (FAULT != 1) & (FAULT != 2);
    pull_down = (a & (FAULT != 3)) | (b & (FAULT != 4));
  end

  always_latch begin
    if (test)           out = cd;
    else if (pull_up)   out = 1'b1;
    else if (pull_down) out = 1'b0;
  end

endmodule
