// output_sa: output register / output signature analyzer of the
// self-testing 74181.
//
// Eight stages hold the eight ALU outputs. In normal operation (normal = 1)
// the block is a plain output register. In the three test phases it is a
// parallel signature analyzer: every ALU output is XORed into its own stage
// while the register shifts, with feedback from stages 8, 6, 5 and 4
// (x^8 + x^6 + x^5 + x^4 + 1, a primitive polynomial) into stage 1.
// clear empties it at the start of a self test.
//
// Stage assignment (stage 1 is where the feedback enters):
//   stage 1 F0   stage 2 F1   stage 3 A=B  stage 4 F2
//   stage 5 F3   stage 6 P'   stage 7 Cn+4 stage 8 G'
// and the outputs Y1..Y8 are stages 8..1. The stage order follows the
// output register drawing; the choice of polynomial is this design's.
//
// The register itself is a reconfig_lfsr with its mode line s tied to
// signature mode. Timing: one clock edge per ALU result; y holds the
// register (the raw signature during and right after a test), q the same
// bits as ALU output fields.
module output_sa
  import bist181_pkg::*;
#(
  parameter logic [SIG_WIDTH-1:0] TAPS = SIG_TAPS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 normal,
  input  logic                 clear,
  input  alu_out_t             d,
  output logic [SIG_WIDTH-1:0] y,
  output alu_out_t             q
);

  logic [SIG_WIDTH-1:0] x;

  always_comb begin
    x = {d.g_n, d.cn4, d.p_n, d.f[3], d.f[2], d.aeqb, d.f[1], d.f[0]};
    q = '{f: {y[4], y[3], y[1], y[0]}, aeqb: y[2], p_n: y[5], cn4: y[6], g_n: y[7]};
  end

  reconfig_lfsr #(.WIDTH(SIG_WIDTH), .TAPS(TAPS)) u_reg (
    .clk(clk), .rst_n(rst_n), .clear(clear),
    .n(normal), .s(1'b1), .x(x), .q(y)
  );

endmodule
