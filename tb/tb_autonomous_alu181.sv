// tb_autonomous_alu181: end-to-end test of the self-testing 74181 at its
// full, only, size.
//
// 1. Normal operation: 300 random ALU operations on the pins; each result
//    appears on the outputs after the next clock edge (pins are sampled
//    by the input register, the result by the output register) and is
//    checked against a
//    reference that adds the select-dependent operands X (A, A+B, A+B', 1)
//    and Y (0, A.B', A.B, A) in arithmetic mode and takes NOT(X xor Y) in
//    logic mode.
// 2. Self test: TEST is pulsed; the run must take 356 cycles (16 + 16 +
//    324 patterns) with the phases in order P0 -> P1 -> P2 -> P3 -> P0,
//    ignore the pins and a second TEST pulse while running, and end with
//    OK high. In parallel the testbench watches the patterns reaching the
//    ALU, recomputes the signature with its own ALU reference and
//    compactor, and compares it with the register and with the fault-free
//    value 8'h89.
// 3. A stuck-at-0 on one N1 slice output is forced for a second self test;
//    OK must then stay low. After releasing it a third test passes again.
// 4. Normal operation resumes after each test.
// 5. The CMOS NOR gate beside the ALU is put through one C/D cycle.
// Every mechanism (each phase transition, test completion, OK, fault
// detection, normal resume, C/D recovery) is counted and must occur.
module tb_autonomous_alu181;
  import bist181_pkg::*;
  logic clk = 0, rst_n = 0, test = 0;
  logic cn = 1, m = 0;
  logic [3:0] a = 0, b = 0, s = 0;
  logic [3:0] f;
  logic aeqb, p_n, cn4, g_n, ok, test_done;
  logic [8:1] y;
  logic [1:0] phase;
  logic cmos_a = 0, cmos_b = 0, cmos_test = 0, cmos_cd = 0, cmos_out;
  int checks = 0, failures = 0;
  int n_p01 = 0, n_p12 = 0, n_p23 = 0, n_p30 = 0, n_ok = 0, n_fault_caught = 0;
  int n_resume = 0, n_cd = 0;

  autonomous_alu181 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reference ALU: {g_n, cn4, p_n, f[3], f[2], aeqb, f[1], f[0]} in the
  // stage order of the signature register, plus the plain fields.
  function automatic alu_out_t ref_alu(input alu_in_t v);
    logic [3:0] x, z, fo;
    logic [4:0] r, r0, r1;
    alu_out_t o;
    case (v.s[1:0])
      2'b00: x = v.a;
      2'b01: x = v.a | v.b;
      2'b10: x = v.a | ~v.b;
      default: x = 4'hF;
    endcase
    case (v.s[3:2])
      2'b00: z = 4'h0;
      2'b01: z = v.a & ~v.b;
      2'b10: z = v.a & v.b;
      default: z = v.a;
    endcase
    r0 = {1'b0, x} + {1'b0, z};
    r  = r0 + {4'b0, ~v.cn};
    r1 = r0 + 5'd1;
    fo = v.m ? ~(x ^ z) : r[3:0];
    o.f = fo;
    o.aeqb = (fo == 4'hF);
    o.cn4 = ~r[4];
    o.g_n = ~r0[4];
    o.p_n = r0[4] ? ~(x == 4'hF) : ~r1[4];
    return o;
  endfunction

  // Independent signature model fed from the patterns seen at the ALU.
  logic [8:0] model_sig;
  always @(posedge clk) begin
    if (phase == 2'(PH0) && test) model_sig <= '0;
    else if (phase != 2'(PH0)) begin
      alu_out_t o;
      logic [8:0] in, nx;
      o = ref_alu(dut.alu_in);
      in = {o.g_n, o.cn4, o.p_n, o.f[3], o.f[2], o.aeqb, o.f[1], o.f[0], 1'b0};
      nx[0] = 1'b0;
      nx[1] = in[1] ^ model_sig[8] ^ model_sig[6] ^ model_sig[5] ^ model_sig[4];
      for (int k = 2; k <= 8; k++) nx[k] = in[k] ^ model_sig[k-1];
      model_sig <= nx;
    end
  end

  // Phase transition counters.
  logic [1:0] phase_d;
  always @(posedge clk) begin
    phase_d <= phase;
    if (rst_n && phase_d != phase) begin
      if (phase_d == 2'(PH0) && phase == 2'(PH1)) n_p01++;
      else if (phase_d == 2'(PH1) && phase == 2'(PH2)) n_p12++;
      else if (phase_d == 2'(PH2) && phase == 2'(PH3)) n_p23++;
      else if (phase_d == 2'(PH3) && phase == 2'(PH0)) n_p30++;
      else begin failures++; $display("FAIL phase order %0d -> %0d", phase_d, phase); end
    end
  end

  task automatic normal_ops(input int n);
    alu_in_t hist [$];
    alu_out_t e;
    for (int i = 0; i < n + 1; i++) begin
      alu_in_t v;
      v = alu_in_t'($urandom);
      {cn, m, a, b, s} = v;
      hist.push_back(v);
      @(posedge clk); #1;
      if (i >= 1) begin
        e = ref_alu(hist[i - 1]);
        check({f, aeqb, p_n, cn4, g_n} == e, "normal operation result");
      end
    end
  endtask

  // Runs one self test, returns the cycle count and the OK seen at the end.
  task automatic self_test(input bit fault_free, output int cycles, output bit ok_seen, output logic [7:0] sig_seen);
    @(negedge clk);
    test = 1;
    @(posedge clk); #1;
    test = 0;
    cycles = 0;
    while (!test_done && cycles < 1000) begin
      // Pins and TEST change during the run; they must not disturb it.
      {cn, m, a, b, s} = 14'($urandom);
      test = (cycles == 100);
      @(posedge clk); #1;
      cycles++;
    end
    test = 0;
    ok_seen = ok;
    sig_seen = y;
    if (fault_free)
      check({y[1], y[2], y[3], y[4], y[5], y[6], y[7], y[8]} == model_sig[8:1],
            "signature equals the independent model");
  endtask

  initial begin
    int cyc;
    bit okv;
    logic [7:0] sg;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    normal_ops(300);

    self_test(1'b1, cyc, okv, sg);
    check(cyc == 356, $sformatf("self test takes 356 cycles (took %0d)", cyc));
    check(okv, "OK after a fault-free self test");
    check({y[1], y[2], y[3], y[4], y[5], y[6], y[7], y[8]} == 8'h89,
          "final signature is 89");
    if (okv) n_ok++;
    normal_ops(50);
    n_resume++;

    // Stuck-at-0 on LI of bit slice 2.
    force dut.u_alu.l[2] = 1'b0;
    self_test(1'b0, cyc, okv, sg);
    release dut.u_alu.l[2];
    check(!okv, "OK stays low with a stuck-at fault");
    if (!okv) n_fault_caught++;
    normal_ops(50);
    n_resume++;

    self_test(1'b1, cyc, okv, sg);
    check(okv, "OK again after the fault is removed");
    if (okv) n_ok++;

    // C/D cycle on the CMOS gate.
    cmos_a = 0; cmos_b = 1; #10;
    cmos_cd = 1; cmos_test = 1; #10;
    check(cmos_out == 1'b1, "C/D charges the node");
    cmos_test = 0; #10;
    check(cmos_out == 1'b0, "good CMOS NOR returns to its value");
    if (cmos_out == 1'b0) n_cd++;

    $display("transitions P0>P1=%0d P1>P2=%0d P2>P3=%0d P3>P0=%0d ok=%0d fault_caught=%0d resume=%0d cd=%0d",
             n_p01, n_p12, n_p23, n_p30, n_ok, n_fault_caught, n_resume, n_cd);
    check(n_p01 == 3 && n_p12 == 3 && n_p23 == 3 && n_p30 == 3, "three complete phase cycles");
    check(n_ok > 0, "mechanism: OK");
    check(n_fault_caught > 0, "mechanism: fault caught");
    check(n_resume > 0, "mechanism: return to normal operation");
    check(n_cd > 0, "mechanism: C/D recovery");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
