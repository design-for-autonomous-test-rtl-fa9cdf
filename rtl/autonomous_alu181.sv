// autonomous_alu181: a 74181 ALU/function generator that tests itself.
//
// The ALU sits between an input register and an output register. A TEST
// pin reconfigures both: the input register becomes an exhaustive pattern
// generator and the output register a parallel signature analyzer, and the
// ALU is tested partition by partition (P1: HI of the four N1 slices, P2:
// LI of the N1 slices, P3: the carry/sum block N2) by holding some inputs
// at values that make the other partitions transparent. No multiplexer is
// added in the ALU's signal path. After 356 clock cycles the phase counter
// returns to normal operation and OK reports whether the signature matches
// the fault-free one.
//
// Interface: the ALU input pins (cn, m, a, b, s) are registered at every
// clock edge in normal operation; the outputs (f, aeqb, p_n, cn4, g_n) are
// registered at the following edge, so pins set up before edge k give
// results that are visible after edge k+1. test is sampled in normal operation and starts the self test;
// while it runs the pins are ignored and the outputs show the evolving
// signature. test_done is high in the first cycle after the test, the one
// cycle in which ok is meaningful. y is the raw output register (Y1..Y8 =
// bits 8..1), phase the current phase for observation.
//
// Alongside, unrelated to the ALU, is the CMOS NOR gate with its C/D tester
// transistor (fault free), with its own pins cmos_*. That cell is a
// behavioural model whose output node keeps its charge, so synthesis of
// this top reports one latch bit; it belongs to the model, not to the ALU.
//
// Follows the described design: the block structure (input register /
// pattern generator, four N1 slices, N2, output register / signature
// analyzer, testing control), the TEST and OK pins and the phase sequence.
// This design's own: the register timing, test_done and the y/phase
// observation ports.
module autonomous_alu181
  import bist181_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       test,
  input  logic       cn,
  input  logic       m,
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic [3:0] s,
  output logic [3:0] f,
  output logic       aeqb,
  output logic       p_n,
  output logic       cn4,
  output logic       g_n,
  output logic [8:1] y,
  output logic       ok,
  output logic       test_done,
  output logic [1:0] phase,
  input  logic       cmos_a,
  input  logic       cmos_b,
  input  logic       cmos_test,
  input  logic       cmos_cd,
  output logic       cmos_out
);

  phase_e   ph;
  logic     advance, clear_sig, z1, z2, z3;
  alu_in_t  pins, alu_in;
  alu_out_t alu_out, out_q;
  logic [SIG_WIDTH-1:0] sig;

  always_comb begin
    pins  = '{cn: cn, m: m, a: a, b: b, s: s};
    phase = ph;
    for (int j = 1; j <= 8; j++) y[j] = sig[8 - j];
    f    = out_q.f;
    aeqb = out_q.aeqb;
    p_n  = out_q.p_n;
    cn4  = out_q.cn4;
    g_n  = out_q.g_n;
  end

  input_tpg u_in (
    .clk(clk), .rst_n(rst_n), .phase(ph), .advance(advance),
    .pins(pins), .q(alu_in), .z1(z1), .z2(z2), .z3(z3)
  );

  alu181 u_alu (
    .a(alu_in.a), .b(alu_in.b), .s(alu_in.s), .m(alu_in.m), .cn(alu_in.cn),
    .f(alu_out.f), .aeqb(alu_out.aeqb), .p_n(alu_out.p_n),
    .cn4(alu_out.cn4), .g_n(alu_out.g_n)
  );

  output_sa u_out (
    .clk(clk), .rst_n(rst_n), .normal(ph == PH0), .clear(clear_sig),
    .d(alu_out), .y(sig), .q(out_q)
  );

  test_control u_ctl (
    .clk(clk), .rst_n(rst_n), .test(test), .z1(z1), .z2(z2), .z3(z3),
    .sig(sig), .phase(ph), .advance(advance), .clear_sig(clear_sig),
    .test_done(test_done), .ok(ok)
  );

  cmos_nor_cd u_cmos (
    .a(cmos_a), .b(cmos_b), .test(cmos_test), .cd(cmos_cd), .out(cmos_out)
  );

endmodule
