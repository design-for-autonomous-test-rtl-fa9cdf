// tb_cmos_nor_cd: shows that the C/D procedure detects every stuck-open
// transistor of the CMOS NOR gate, and that plain pattern application
// in an unlucky order does not.
//
// Five gates are modelled: fault free and with transistor (1)..(4) stuck
// open. First the four input patterns are applied in the order 00, 10,
// 01, 11 without C/D pulses: with pull-down (4) open, pattern 01 finds
// the node already at 0 and the fault goes unseen. Then every pattern is
// followed by a C/D pulse driving the node to the complement of the
// expected value; after TEST falls, the output is compared with the NOR of
// the inputs. The fault-free gate must always pass and each faulty gate
// must fail at least one pattern.
module tb_cmos_nor_cd;
  logic a = 0, b = 0, test = 0, cd = 0;
  logic [4:0] out;
  int checks = 0, failures = 0;

  cmos_nor_cd #(.FAULT(0)) g0 (.a(a), .b(b), .test(test), .cd(cd), .out(out[0]));
  cmos_nor_cd #(.FAULT(1)) g1 (.a(a), .b(b), .test(test), .cd(cd), .out(out[1]));
  cmos_nor_cd #(.FAULT(2)) g2 (.a(a), .b(b), .test(test), .cd(cd), .out(out[2]));
  cmos_nor_cd #(.FAULT(3)) g3 (.a(a), .b(b), .test(test), .cd(cd), .out(out[3]));
  cmos_nor_cd #(.FAULT(4)) g4 (.a(a), .b(b), .test(test), .cd(cd), .out(out[4]));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] order [4] = '{2'b00, 2'b10, 2'b01, 2'b11};
    logic [4:0] seen_plain, seen_cd;
    logic exp;
    seen_plain = '0; seen_cd = '0;
    // Plain application, no C/D pulses.
    foreach (order[i]) begin
      {a, b} = order[i]; #10;
      exp = ~(a | b);
      for (int k = 0; k < 5; k++) if (out[k] !== exp) seen_plain[k] = 1;
    end
    checks++;
    if (seen_plain[0]) begin failures++; $display("FAIL fault-free gate wrong without C/D"); end
    checks++;
    if (seen_plain[4]) begin failures++; $display("FAIL open (4) should be masked in this order"); end
    // With a C/D pulse after each pattern.
    foreach (order[i]) begin
      {a, b} = order[i]; #10;
      exp = ~(a | b);
      cd = ~exp; test = 1; #10;
      test = 0; #10;
      for (int k = 0; k < 5; k++) if (out[k] !== exp) seen_cd[k] = 1;
      checks++;
      if (out[0] !== exp) begin failures++; $display("FAIL fault-free gate after C/D, ab=%b", order[i]); end
    end
    for (int k = 1; k < 5; k++) begin
      checks++;
      if (!seen_cd[k]) begin failures++; $display("FAIL stuck-open (%0d) not detected with C/D", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
