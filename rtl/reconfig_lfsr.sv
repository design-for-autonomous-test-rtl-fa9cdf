// reconfig_lfsr: reconfigurable linear feedback shift register module.
//
// Two control lines select one of three modes for a WIDTH-stage register:
//   n = 1         register: every stage loads its own input x (x[k-1] into
//                 stage k) and the stage outputs are read on q.
//   n = 0, s = 0  input generator: the inputs are ignored and the register
//                 steps through all 2^WIDTH states, the all-zero state
//                 included. Stage 1 receives the XOR of the tapped stages,
//                 XORed again with the NOR of stages 1..WIDTH-1; that NOR
//                 term splices the all-zero state into the maximal-length
//                 sequence (a de Bruijn counter). The other stages shift.
//   n = 0, s = 1  parallel signature analyzer: stage 1 loads x[0] XOR the
//                 linear feedback, stage k loads x[k-1] XOR stage k-1. The
//                 NOR term is left out, so compaction stays linear.
// The three modes, the XOR feedback and the NOR splice follow the 3-bit
// example module; TAPS, the clear input and the asynchronous reset are this
// design's additions. TAPS must describe a primitive polynomial for the
// generator mode to visit every state; the 3-bit default, stages 2 and 3,
// is x^3 + x^2 + 1.
//
// Timing: all updates happen on the rising clock edge; clear (synchronous)
// empties the register and has priority over the mode. rst_n is
// asynchronous and active low.
module reconfig_lfsr #(
  parameter int unsigned          WIDTH = 3,
  parameter logic [WIDTH-1:0]     TAPS  = 3'b110
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             n,
  input  logic             s,
  input  logic [WIDTH-1:0] x,
  output logic [WIDTH-1:0] q
);

  logic fb_lin;
  logic zero_low;

  always_comb begin
    fb_lin   = ^(q & TAPS);
    zero_low = ~|q[WIDTH-2:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else if (clear) begin
      q <= '0;
    end else if (n) begin
      q <= x;
    end else if (!s) begin
      q <= {q[WIDTH-2:0], fb_lin ^ zero_low};
    end else begin
      q <= x ^ {q[WIDTH-2:0], fb_lin};
    end
  end

  initial begin
    assert (WIDTH >= 2) else $error("reconfig_lfsr needs at least two stages");
  end

endmodule
