// test_control: testing control circuit of the self-testing 74181.
//
// A four-state phase counter (two flip-flops, counting P0 -> P1 -> P2 ->
// P3 -> P0) supplies the phase to the input and output registers. In P0 a
// high TEST input starts the self test; in Pk (k = 1..3) the end-of-phase
// line Zk from the input pattern generator advances the counter. The
// advance strobe doubles as the reset that loads the first pattern of the
// next phase into the generator. clear_sig empties the signature analyzer
// in the cycle in which the test starts.
//
// After the third phase the counter is back in P0 and the output register
// still holds the final signature for one cycle: ok is high in P0 when the
// register equals GOLDEN, so it is valid in the first cycle after the test
// (test_done marks that cycle). The cycle after, the output register loads
// normal ALU results again, so ok is only meaningful in that cycle. The
// phase counter, the AND-style end detectors and the signature decoder
// follow the control described for the design; the synchronous advance
// (rather than a derived counter clock), test_done and the reset are this
// design's choices. rst_n is asynchronous, active low.
module test_control
  import bist181_pkg::*;
#(
  parameter logic [SIG_WIDTH-1:0] GOLDEN = GOLDEN_SIG
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 test,
  input  logic                 z1,
  input  logic                 z2,
  input  logic                 z3,
  input  logic [SIG_WIDTH-1:0] sig,
  output phase_e               phase,
  output logic                 advance,
  output logic                 clear_sig,
  output logic                 test_done,
  output logic                 ok
);

  phase_e phase_next;

  always_comb begin
    advance = ((phase == PH0) & test) | ((phase == PH1) & z1)
            | ((phase == PH2) & z2) | ((phase == PH3) & z3);
    unique case (phase)
      PH0: phase_next = PH1;
      PH1: phase_next = PH2;
      PH2: phase_next = PH3;
      PH3: phase_next = PH0;
    endcase
    clear_sig = (phase == PH0) & test;
    ok        = (phase == PH0) & (sig == GOLDEN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= PH0;
      test_done <= 1'b0;
    end else begin
      if (advance) phase <= phase_next;
      test_done <= advance & (phase == PH3);
    end
  end

endmodule
