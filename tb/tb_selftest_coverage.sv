// tb_selftest_coverage: single stuck-at fault campaign on the self test.
//
// The claim behind the partitioned exhaustive test is that any fault that
// changes the input/output behaviour of a partition is caught, without a
// fault model. This testbench injects, one at a time, a stuck-at-0 and a
// stuck-at-1 on every line between the partitions and registers of the
// self-testing ALU: the eight N1 outputs (H0..H3, L0..L3), the internal
// carries of N2, the eight ALU outputs and the fourteen ALU inputs - 34
// lines, 68 faults. For each it runs a full self test, records the 356
// ALU responses that enter the signature analyzer and whether OK stays
// low. A fault-free run before and after must give OK.
// Two questions are kept apart. Exposure: every fault must change at least
// one of the 356 responses - this is what exhaustive partition testing
// guarantees, and a fault that is not exposed fails the run. Compaction:
// an exposed fault can still leave the fault-free signature (aliasing,
// about 1 in 256 for an 8-stage analyzer). Aliased faults are listed by
// name and counted; the run also fails if more than two of the 68 alias.
module tb_selftest_coverage;
  import bist181_pkg::*;
  logic clk = 0, rst_n = 0, test = 0;
  logic [3:0] f;
  logic aeqb, p_n, cn4, g_n, ok, test_done, cmos_out;
  logic [8:1] y;
  logic [1:0] phase;
  int checks = 0, failures = 0, detected = 0, exposed = 0, aliased = 0;
  alu_out_t good_stream [TEST_CYCLES];
  alu_out_t this_stream [TEST_CYCLES];
  bit recording = 0;
  int rec_idx = 0;

  // Record the response the analyzer compacts at each edge of a test.
  always @(posedge clk) begin
    if (recording && phase != 2'(PH0) && rec_idx < TEST_CYCLES) begin
      this_stream[rec_idx] <= dut.alu_out;
      rec_idx <= rec_idx + 1;
    end
  end
  localparam int NSITES = 34;
  string site_name [NSITES] = '{"H0", "H1", "H2", "H3", "L0", "L1", "L2", "L3", "carry c1", "carry c2", "carry c3", "carry c4", "F0", "F1", "F2", "F3", "aeqb", "p_n", "cn4", "g_n", "A0", "A1", "A2", "A3", "B0", "B1", "B2", "B3", "S0", "S1", "S2", "S3", "M", "Cn"};

  autonomous_alu181 dut (
    .clk(clk), .rst_n(rst_n), .test(test), .cn(1'b1), .m(1'b0), .a(4'h0), .b(4'h0), .s(4'h0),
    .f(f), .aeqb(aeqb), .p_n(p_n), .cn4(cn4), .g_n(g_n), .y(y), .ok(ok),
    .test_done(test_done), .phase(phase),
    .cmos_a(1'b0), .cmos_b(1'b0), .cmos_test(1'b0), .cmos_cd(1'b0), .cmos_out(cmos_out));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic inject(input int k, input bit v);
    case (k)
        0: if (v) force dut.u_alu.h[0] = 1'b1; else force dut.u_alu.h[0] = 1'b0;
        1: if (v) force dut.u_alu.h[1] = 1'b1; else force dut.u_alu.h[1] = 1'b0;
        2: if (v) force dut.u_alu.h[2] = 1'b1; else force dut.u_alu.h[2] = 1'b0;
        3: if (v) force dut.u_alu.h[3] = 1'b1; else force dut.u_alu.h[3] = 1'b0;
        4: if (v) force dut.u_alu.l[0] = 1'b1; else force dut.u_alu.l[0] = 1'b0;
        5: if (v) force dut.u_alu.l[1] = 1'b1; else force dut.u_alu.l[1] = 1'b0;
        6: if (v) force dut.u_alu.l[2] = 1'b1; else force dut.u_alu.l[2] = 1'b0;
        7: if (v) force dut.u_alu.l[3] = 1'b1; else force dut.u_alu.l[3] = 1'b0;
        8: if (v) force dut.u_alu.u_n2.c[1] = 1'b1; else force dut.u_alu.u_n2.c[1] = 1'b0;
        9: if (v) force dut.u_alu.u_n2.c[2] = 1'b1; else force dut.u_alu.u_n2.c[2] = 1'b0;
        10: if (v) force dut.u_alu.u_n2.c[3] = 1'b1; else force dut.u_alu.u_n2.c[3] = 1'b0;
        11: if (v) force dut.u_alu.u_n2.c[4] = 1'b1; else force dut.u_alu.u_n2.c[4] = 1'b0;
        12: if (v) force dut.alu_out.f[0] = 1'b1; else force dut.alu_out.f[0] = 1'b0;
        13: if (v) force dut.alu_out.f[1] = 1'b1; else force dut.alu_out.f[1] = 1'b0;
        14: if (v) force dut.alu_out.f[2] = 1'b1; else force dut.alu_out.f[2] = 1'b0;
        15: if (v) force dut.alu_out.f[3] = 1'b1; else force dut.alu_out.f[3] = 1'b0;
        16: if (v) force dut.alu_out.aeqb = 1'b1; else force dut.alu_out.aeqb = 1'b0;
        17: if (v) force dut.alu_out.p_n = 1'b1; else force dut.alu_out.p_n = 1'b0;
        18: if (v) force dut.alu_out.cn4 = 1'b1; else force dut.alu_out.cn4 = 1'b0;
        19: if (v) force dut.alu_out.g_n = 1'b1; else force dut.alu_out.g_n = 1'b0;
        20: if (v) force dut.alu_in.a[0] = 1'b1; else force dut.alu_in.a[0] = 1'b0;
        21: if (v) force dut.alu_in.a[1] = 1'b1; else force dut.alu_in.a[1] = 1'b0;
        22: if (v) force dut.alu_in.a[2] = 1'b1; else force dut.alu_in.a[2] = 1'b0;
        23: if (v) force dut.alu_in.a[3] = 1'b1; else force dut.alu_in.a[3] = 1'b0;
        24: if (v) force dut.alu_in.b[0] = 1'b1; else force dut.alu_in.b[0] = 1'b0;
        25: if (v) force dut.alu_in.b[1] = 1'b1; else force dut.alu_in.b[1] = 1'b0;
        26: if (v) force dut.alu_in.b[2] = 1'b1; else force dut.alu_in.b[2] = 1'b0;
        27: if (v) force dut.alu_in.b[3] = 1'b1; else force dut.alu_in.b[3] = 1'b0;
        28: if (v) force dut.alu_in.s[0] = 1'b1; else force dut.alu_in.s[0] = 1'b0;
        29: if (v) force dut.alu_in.s[1] = 1'b1; else force dut.alu_in.s[1] = 1'b0;
        30: if (v) force dut.alu_in.s[2] = 1'b1; else force dut.alu_in.s[2] = 1'b0;
        31: if (v) force dut.alu_in.s[3] = 1'b1; else force dut.alu_in.s[3] = 1'b0;
        32: if (v) force dut.alu_in.m = 1'b1; else force dut.alu_in.m = 1'b0;
        33: if (v) force dut.alu_in.cn = 1'b1; else force dut.alu_in.cn = 1'b0;
      default: ;
    endcase
  endtask

  task automatic remove(input int k);
    case (k)
        0: release dut.u_alu.h[0];
        1: release dut.u_alu.h[1];
        2: release dut.u_alu.h[2];
        3: release dut.u_alu.h[3];
        4: release dut.u_alu.l[0];
        5: release dut.u_alu.l[1];
        6: release dut.u_alu.l[2];
        7: release dut.u_alu.l[3];
        8: release dut.u_alu.u_n2.c[1];
        9: release dut.u_alu.u_n2.c[2];
        10: release dut.u_alu.u_n2.c[3];
        11: release dut.u_alu.u_n2.c[4];
        12: release dut.alu_out.f[0];
        13: release dut.alu_out.f[1];
        14: release dut.alu_out.f[2];
        15: release dut.alu_out.f[3];
        16: release dut.alu_out.aeqb;
        17: release dut.alu_out.p_n;
        18: release dut.alu_out.cn4;
        19: release dut.alu_out.g_n;
        20: release dut.alu_in.a[0];
        21: release dut.alu_in.a[1];
        22: release dut.alu_in.a[2];
        23: release dut.alu_in.a[3];
        24: release dut.alu_in.b[0];
        25: release dut.alu_in.b[1];
        26: release dut.alu_in.b[2];
        27: release dut.alu_in.b[3];
        28: release dut.alu_in.s[0];
        29: release dut.alu_in.s[1];
        30: release dut.alu_in.s[2];
        31: release dut.alu_in.s[3];
        32: release dut.alu_in.m;
        33: release dut.alu_in.cn;
      default: ;
    endcase
  endtask

  task automatic run_test(output bit ok_seen, output int cycles);
    @(negedge clk); test = 1; recording = 1; rec_idx = 0;
    @(posedge clk); #1; test = 0;
    cycles = 0;
    while (!test_done && cycles < 1000) begin
      @(posedge clk); #1;
      cycles++;
    end
    ok_seen = ok;
    recording = 0;
  endtask

  initial begin
    bit okv;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_test(okv, cyc);
    checks++;
    if (!okv || cyc != TEST_CYCLES) begin failures++; $display("FAIL fault-free run"); end
    checks++;
    if (rec_idx != TEST_CYCLES) begin failures++; $display("FAIL recorded %0d responses", rec_idx); end
    good_stream = this_stream;
    for (int k = 0; k < NSITES; k++) begin
      for (int v = 0; v < 2; v++) begin
        inject(k, v[0]);
        run_test(okv, cyc);
        remove(k);
        begin
          automatic bit differs = 0;
          for (int i = 0; i < TEST_CYCLES; i++) if (this_stream[i] != good_stream[i]) differs = 1;
          checks++;
          if (!differs) begin
            failures++;
            $display("FAIL %s stuck-at-%0d changes no response", site_name[k], v);
          end else exposed++;
          if (okv) begin
            aliased++;
            $display("aliased: %s stuck-at-%0d leaves the fault-free signature", site_name[k], v);
          end else detected++;
        end
      end
    end
    run_test(okv, cyc);
    checks++;
    if (!okv) begin failures++; $display("FAIL fault-free run after the campaign"); end
    checks++;
    if (aliased > 2) begin failures++; $display("FAIL %0d faults aliased", aliased); end
    $display("stuck-at faults exposed by the patterns: %0d of %0d", exposed, 2 * NSITES);
    $display("stuck-at faults flagged by OK: %0d of %0d (aliased: %0d)", detected, 2 * NSITES, aliased);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
