// tb_alu181_n2: exhaustive check of the N2 block over its reachable inputs.
//
// Each (HI, LI) pair takes the three values 11, 10 and 00 that the N1
// slices can produce, and M and Cn all four values: 3^4 * 4 = 324
// patterns, the same set the self test applies. The reference adds the
// propagate word p = NOT L and the generate word g = NOT H with carry
// NOT Cn: in arithmetic mode F is the low four bits of that sum, in logic
// mode F = H xnor L. G', P' and Cn+4 come from the group carry of the sum.
module tb_alu181_n2;
  logic [3:0] h, l, f;
  logic m, cn, aeqb, p_n, cn4, g_n;
  int checks = 0, failures = 0;

  alu181_n2 dut (.h(h), .l(l), .m(m), .cn(cn), .f(f), .aeqb(aeqb),
                 .p_n(p_n), .cn4(cn4), .g_n(g_n));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] p, g, ef;
    logic [4:0] sum, sum0;
    int d;
    for (int v = 0; v < 324; v++) begin
      d = v / 4;
      {m, cn} = 2'(v % 4);
      for (int i = 0; i < 4; i++) begin
        case (d % 3)
          0: {h[i], l[i]} = 2'b11;
          1: {h[i], l[i]} = 2'b10;
          default: {h[i], l[i]} = 2'b00;
        endcase
        d = d / 3;
      end
      #1;
      p = ~l; g = ~h;
      sum  = {1'b0, p} + {1'b0, g} + {4'b0, ~cn};
      sum0 = {1'b0, p} + {1'b0, g};
      ef = m ? ~(h ^ l) : sum[3:0];
      checks++;
      if (f !== ef) begin failures++; $display("FAIL F h=%b l=%b m=%b cn=%b f=%b exp=%b", h, l, m, cn, f, ef); end
      checks++;
      if (aeqb !== (ef == 4'hF)) begin failures++; $display("FAIL A=B"); end
      checks++;
      if (cn4 !== ~sum[4]) begin failures++; $display("FAIL Cn+4 h=%b l=%b cn=%b", h, l, cn); end
      checks++;
      if (g_n !== ~sum0[4]) begin failures++; $display("FAIL G' h=%b l=%b", h, l); end
      checks++;
      if (p_n !== ~(p == 4'hF)) begin failures++; $display("FAIL P' h=%b l=%b", h, l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
