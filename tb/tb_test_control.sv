// tb_test_control: checks the phase counter and the OK decoder.
//
// The testbench drives TEST, the three end-of-phase lines and the
// signature. It checks that TEST only acts in P0, that each Zk advances
// the counter only in phase Pk, the order P0 -> P1 -> P2 -> P3 -> P0,
// the advance and clear strobes, and that OK is high in P0 exactly when
// the signature equals the fault-free value, with test_done marking the
// first cycle back in P0.
module tb_test_control;
  import bist181_pkg::*;
  logic clk = 0, rst_n = 0, test = 0, z1 = 0, z2 = 0, z3 = 0;
  logic [7:0] sig = '0;
  phase_e phase;
  logic advance, clear_sig, test_done, ok;
  int checks = 0, failures = 0;

  test_control dut (.clk(clk), .rst_n(rst_n), .test(test), .z1(z1), .z2(z2), .z3(z3),
                    .sig(sig), .phase(phase), .advance(advance), .clear_sig(clear_sig),
                    .test_done(test_done), .ok(ok));

  always #5 clk = ~clk;

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (phase=%s)", what, phase.name()); end
  endtask

  task automatic tick; @(posedge clk); #1; endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1; #1;
    check(phase == PH0, "reset to P0");
    // Z lines alone do nothing in P0.
    z1 = 1; z2 = 1; z3 = 1; #1;
    check(!advance, "no advance from Z in P0");
    tick;
    check(phase == PH0, "still P0");
    z1 = 0; z2 = 0; z3 = 0;
    // OK decode in P0.
    sig = GOLDEN_SIG; #1; check(ok, "ok with golden signature in P0");
    sig = GOLDEN_SIG ^ 8'h10; #1; check(!ok, "no ok with wrong signature");
    // Start.
    test = 1; #1;
    check(advance && clear_sig, "TEST gives advance and clear");
    tick; test = 0;
    check(phase == PH1, "P0 -> P1");
    // Wrong Z lines do not advance.
    z2 = 1; z3 = 1; test = 1; #1;
    check(!advance && !clear_sig, "only Z1 ends P1");
    sig = GOLDEN_SIG; #1; check(!ok, "no ok outside P0");
    tick; check(phase == PH1, "held in P1");
    z2 = 0; z3 = 0; test = 0; z1 = 1; #1;
    check(advance, "Z1 advances");
    tick; z1 = 0; check(phase == PH2, "P1 -> P2");
    z1 = 1; z3 = 1; tick; check(phase == PH2, "held in P2");
    z1 = 0; z3 = 0; z2 = 1; tick; z2 = 0; check(phase == PH3, "P2 -> P3");
    z1 = 1; z2 = 1; tick; check(phase == PH3, "held in P3");
    z1 = 0; z2 = 0; check(!test_done, "no done yet");
    z3 = 1; tick; z3 = 0;
    check(phase == PH0, "P3 -> P0");
    check(test_done, "done marks the first P0 cycle");
    check(ok, "ok after the test with the golden signature");
    tick;
    check(!test_done, "done lasts one cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
