// input_tpg: input register / input test pattern generator of the
// self-testing 74181.
//
// Fourteen flip-flops hold the ALU inputs Cn, M, A0..A3, B0..B3, S0..S3.
// In normal operation (phase P0) they load the input pins every cycle. In
// the three test phases the same flip-flops are fed back on themselves so
// that they step through the exhaustive test set of one partition:
//
//   P1 (HI of N1): M = 1, S0 = S1 = 1, Cn = 1, which forces every LI to 0.
//      A 4-stage modified LFSR (x^4 + x^3 + 1 with the all-zero splice)
//      runs through all 16 values of [A, B, S2, S3]; all four A bits carry
//      the same value, as do all four B bits, so the four slices are tested
//      in parallel.
//   P2 (LI of N1): M = 1, S2 = S3 = 0, Cn = 1, which forces every HI to 1;
//      the same generator runs through all 16 values of [A, B, S0, S1].
//   P3 (N2): S3 = 1, S2 = S1 = S0 = 0, so HI = NOT(AI.BI) and LI = NOT AI.
//      Each (AI, BI) pair steps 00 -> 10 -> 11 -> 00 independently, like a
//      base-3 digit, and (M, Cn) is a 2-bit counter below the lowest digit:
//      3^4 * 4 = 324 patterns drive every reachable (HI, LI) combination
//      with every M and Cn value.
//
// Each phase starts from its first pattern (LFSR state 0000, or all digits
// 00 with M = Cn = 0) when the testing control pulses advance; the same
// pulse in P3 returns the register to loading the pins. Z1, Z2 and Z3
// decode the last pattern of each generator and are qualified by the phase
// in the testing control.
//
// What follows the description: reuse of the input flip-flops, fixed M and
// select values per phase (the select flip-flops load 1 in P1 and 0 in P3
// for S0/S1, 0 in P2 and 1 in P3 for S3), the phase order HI, LI, N2, the exhaustive coverage and the pattern counts.
// This design's choices: the generator polynomial, the first pattern of each
// phase, Cn = 1 during P1 and P2, and a digit counter in P3 in place of a
// second LFSR. Timing: one pattern per clock; q is the register output
// that drives the ALU.
module input_tpg
  import bist181_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  phase_e  phase,
  input  logic    advance,
  input  alu_in_t pins,
  output alu_in_t q,
  output logic    z1,
  output logic    z2,
  output logic    z3
);

  // One step of the 4-stage complete-sequence generator, st[0] first.
  function automatic logic [3:0] mlfsr4_step(input logic [3:0] st);
    logic fb;
    fb = st[2] ^ st[3] ^ ~(st[0] | st[1] | st[2]);
    return {st[2:0], fb};
  endfunction

  // Drive the generator state onto the A/B lines and two select lines.
  function automatic alu_in_t n1_pattern(input logic [3:0] st, input logic high_sel);
    alu_in_t r;
    r.cn = 1'b1;
    r.m  = 1'b1;
    r.a  = {4{st[0]}};
    r.b  = {4{st[1]}};
    r.s  = high_sel ? {st[3], st[2], 2'b11} : {2'b00, st[3], st[2]};
    return r;
  endfunction

  localparam alu_in_t FIRST_P3 = '{cn: 1'b0, m: 1'b0, a: 4'h0, b: 4'h0, s: 4'b1000};

  logic [3:0] st1, st2;
  alu_in_t    gen1, gen2, gen3, q_next;

  always_comb begin
    st1  = mlfsr4_step({q.s[3], q.s[2], q.b[0], q.a[0]});
    st2  = mlfsr4_step({q.s[1], q.s[0], q.b[0], q.a[0]});
    gen1 = n1_pattern(st1, 1'b1);
    gen2 = n1_pattern(st2, 1'b0);

    // P3: (M, Cn) counts first; each carry advances the next (A, B) digit.
    gen3 = q;
    begin
      logic carry;
      {gen3.m, gen3.cn} = {q.m, q.cn} + 2'd1;
      carry = q.m & q.cn;
      for (int i = 0; i < 4; i++) begin
        if (carry) begin
          gen3.a[i] = ~q.b[i];
          gen3.b[i] = q.a[i] & ~q.b[i];
        end
        carry = carry & q.a[i] & q.b[i];
      end
    end
    gen3.s = 4'b1000;

    q_next = pins;
    if (advance) begin
      unique case (phase)
        PH0: q_next = n1_pattern(4'b0000, 1'b1);
        PH1: q_next = n1_pattern(4'b0000, 1'b0);
        PH2: q_next = FIRST_P3;
        PH3: q_next = pins;
      endcase
    end else begin
      unique case (phase)
        PH0: q_next = pins;
        PH1: q_next = gen1;
        PH2: q_next = gen2;
        PH3: q_next = gen3;
      endcase
    end

    // Last state of each generator: LFSR state 0001 (stage 4 set), or every
    // digit at 11 with M = Cn = 1.
    z1 = ~q.a[0] & ~q.b[0] & ~q.s[2] & q.s[3];
    z2 = ~q.a[0] & ~q.b[0] & ~q.s[0] & q.s[1];
    z3 = (&q.a) & (&q.b) & q.m & q.cn;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end

endmodule
