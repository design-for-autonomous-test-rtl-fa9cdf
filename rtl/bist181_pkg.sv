// bist181_pkg: types and constants shared by the self-testing 74181 ALU.
//
// The design runs in one of four phases. P0 is normal operation; P1, P2
// and P3 are the three test phases. P1 exercises the HI functions of the
// four N1 slices, P2 their LI functions, and P3 the carry/sum block N2.
// The phase encoding is a two-flip-flop twisted-ring (Johnson) count,
// 00 -> 01 -> 11 -> 10 -> 00, so that only one flip-flop changes per step;
// the encoding itself is this design's choice.
//
// Pattern counts follow from exhaustive testing of each partition:
// 16 patterns each for P1 and P2 (all combinations of AI, BI and two select
// lines), and 3^4 * 2^2 = 324 for P3 (each (AI,BI) pair cycled through
// 00, 10, 11 while M and Cn take all four values). The self test therefore
// lasts 356 clock cycles.
//
// GOLDEN_SIG is the fault-free signature left in the output signature
// analyzer after the 356 patterns, for the pattern order defined in
// input_tpg and the feedback polynomial x^8 + x^6 + x^5 + x^4 + 1 of
// output_sa. It must be recomputed if either is changed.
package bist181_pkg;

  typedef enum logic [1:0] {
    PH0 = 2'b00,   // normal operation
    PH1 = 2'b01,   // test HI functions of N1
    PH2 = 2'b11,   // test LI functions of N1
    PH3 = 2'b10    // test N2
  } phase_e;

  // Inputs of the ALU, as held by the input register.
  typedef struct packed {
    logic       cn;   // carry in, active low
    logic       m;    // mode: 1 = logic, 0 = arithmetic
    logic [3:0] a;
    logic [3:0] b;
    logic [3:0] s;    // function select S3..S0
  } alu_in_t;

  // Outputs of the ALU, as held by the output register.
  typedef struct packed {
    logic [3:0] f;    // function outputs F3..F0
    logic       aeqb; // A=B (all F high)
    logic       p_n;  // group propagate, active low
    logic       cn4;  // carry out, active low
    logic       g_n;  // group generate, active low
  } alu_out_t;

  localparam int unsigned N_PAT_P1    = 16;
  localparam int unsigned N_PAT_P2    = 16;
  localparam int unsigned N_PAT_P3    = 324;
  localparam int unsigned TEST_CYCLES = N_PAT_P1 + N_PAT_P2 + N_PAT_P3;

  localparam int unsigned SIG_WIDTH = 8;
  // Feedback taps of the signature analyzer, bit k-1 = stage k:
  // stages 8, 6, 5 and 4, i.e. x^8 + x^6 + x^5 + x^4 + 1.
  localparam logic [SIG_WIDTH-1:0] SIG_TAPS   = 8'b1011_1000;
  localparam logic [SIG_WIDTH-1:0] GOLDEN_SIG = 8'h89;

endpackage
