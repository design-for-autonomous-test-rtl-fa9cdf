// tb_input_tpg: checks the input register / pattern generator phase by
// phase.
//
// The testbench plays the testing control: it holds each phase until the
// phase's Z line is high and then pulses advance. It checks that
//  - in P0 the register loads the pins;
//  - P1 lasts 16 cycles, holds M = 1, S0 = S1 = 1, all A bits equal and
//    all B bits equal, and applies all 16 values of [A, B, S2, S3];
//  - P2 lasts 16 cycles, holds M = 1, S2 = S3 = 0 and applies all 16
//    values of [A, B, S0, S1];
//  - P3 lasts 324 cycles, holds S = 1000, keeps every (AI, BI) pair in
//    {00, 10, 11} and applies every such combination with every M, Cn;
//  - Z1..Z3 are high only on the last pattern of their phase;
//  - after P3 the register loads the pins again.
module tb_input_tpg;
  import bist181_pkg::*;
  logic clk = 0, rst_n = 0, advance = 0;
  phase_e phase = PH0;
  alu_in_t pins, q;
  logic z1, z2, z3;
  int checks = 0, failures = 0;

  input_tpg dut (.clk(clk), .rst_n(rst_n), .phase(phase), .advance(advance),
                 .pins(pins), .q(q), .z1(z1), .z2(z2), .z3(z3));

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (q=%h)", what, q); end
  endtask

  function automatic bit pair_ok(input alu_in_t v);
    for (int i = 0; i < 4; i++) if ({v.a[i], v.b[i]} == 2'b01) return 0;
    return 1;
  endfunction

  initial begin
    bit seen1 [16];
    bit seen2 [16];
    bit seen3 [1024];
    int cnt, idx;
    pins = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 10; i++) begin
      pins = alu_in_t'($urandom);
      @(posedge clk); #1;
      check(q == pins, "P0 loads pins");
    end
    // Enter P1.
    advance = 1; @(posedge clk); #1; advance = 0; phase = PH1;
    cnt = 0;
    forever begin
      cnt++;
      check(q.m == 1 && q.s[1:0] == 2'b11 && q.a == {4{q.a[0]}} && q.b == {4{q.b[0]}},
            "P1 constant lines");
      idx = {q.s[3], q.s[2], q.b[0], q.a[0]};
      check(!seen1[idx], "P1 pattern repeated");
      seen1[idx] = 1;
      if (z1 || cnt > 40) break;
      @(posedge clk); #1;
    end
    check(cnt == N_PAT_P1, "P1 length");
    advance = 1; @(posedge clk); #1; advance = 0; phase = PH2;
    cnt = 0;
    forever begin
      cnt++;
      check(q.m == 1 && q.s[3:2] == 2'b00 && q.a == {4{q.a[0]}} && q.b == {4{q.b[0]}},
            "P2 constant lines");
      idx = {q.s[1], q.s[0], q.b[0], q.a[0]};
      check(!seen2[idx], "P2 pattern repeated");
      seen2[idx] = 1;
      if (z2 || cnt > 40) break;
      @(posedge clk); #1;
    end
    check(cnt == N_PAT_P2, "P2 length");
    advance = 1; @(posedge clk); #1; advance = 0; phase = PH3;
    cnt = 0;
    forever begin
      cnt++;
      check(q.s == 4'b1000 && pair_ok(q), "P3 select and (A,B) pairs");
      idx = {q.m, q.cn, q.a, q.b};
      check(!seen3[idx], "P3 pattern repeated");
      seen3[idx] = 1;
      if (z3 || cnt > 700) break;
      @(posedge clk); #1;
    end
    check(cnt == N_PAT_P3, "P3 length");
    pins = alu_in_t'($urandom);
    advance = 1; @(posedge clk); #1; advance = 0; phase = PH0;
    check(q == pins, "back to loading pins after P3");
    $display("P1=%0d P2=%0d P3=%0d patterns", N_PAT_P1, N_PAT_P2, cnt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
