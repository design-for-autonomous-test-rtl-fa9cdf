// tb_alu181: exhaustive check of the complete 74181 against its function
// table (active-high data).
//
// All 2^14 combinations of A, B, S, M and Cn are applied. Logic mode (M = 1)
// is checked against the sixteen named logic functions, arithmetic mode
// against the sixteen named arithmetic functions (for example S = 1001:
// A plus B, S = 0110: A minus B minus 1), plus one when Cn is low. Cn+4 is
// the inverted carry out of the five-bit result and A=B is F = 1111.
module tb_alu181;
  logic [3:0] a, b, s, f;
  logic m, cn, aeqb, p_n, cn4, g_n;
  int checks = 0, failures = 0;

  alu181 dut (.a(a), .b(b), .s(s), .m(m), .cn(cn), .f(f), .aeqb(aeqb),
              .p_n(p_n), .cn4(cn4), .g_n(g_n));

  function automatic logic [3:0] logic_fn(input logic [3:0] sel, x, z);
    case (sel)
      4'h0: return ~x;
      4'h1: return ~(x | z);
      4'h2: return ~x & z;
      4'h3: return 4'h0;
      4'h4: return ~(x & z);
      4'h5: return ~z;
      4'h6: return x ^ z;
      4'h7: return x & ~z;
      4'h8: return ~x | z;
      4'h9: return ~(x ^ z);
      4'hA: return z;
      4'hB: return x & z;
      4'hC: return 4'hF;
      4'hD: return x | ~z;
      4'hE: return x | z;
      default: return x;
    endcase
  endfunction

  // Arithmetic functions with no carry in, as a 5-bit result.
  function automatic logic [4:0] arith_fn(input logic [3:0] sel, x, z);
    logic [4:0] X, Z;
    X = {1'b0, x}; Z = {1'b0, z};
    case (sel)
      4'h0: return X;
      4'h1: return {1'b0, x | z};
      4'h2: return {1'b0, x | ~z};
      4'h3: return 5'h0F;                             // minus 1
      4'h4: return X + {1'b0, x & ~z};
      4'h5: return {1'b0, x | z} + {1'b0, x & ~z};
      4'h6: return X + {1'b0, ~z};                    // A minus B minus 1
      4'h7: return {1'b0, x & ~z} + 5'h0F;            // (A.B') minus 1
      4'h8: return X + {1'b0, x & z};
      4'h9: return X + Z;
      4'hA: return {1'b0, x | ~z} + {1'b0, x & z};
      4'hB: return {1'b0, x & z} + 5'h0F;
      4'hC: return X + X;
      4'hD: return {1'b0, x | z} + X;
      4'hE: return {1'b0, x | ~z} + X;
      default: return X + 5'h0F;                      // A minus 1
    endcase
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4:0] r;
    logic [3:0] ef;
    for (int v = 0; v < (1 << 14); v++) begin
      {m, cn, s, a, b} = v[13:0];
      #1;
      r  = arith_fn(s, a, b) + {4'b0, ~cn};
      ef = m ? logic_fn(s, a, b) : r[3:0];
      checks++;
      if (f !== ef) begin
        failures++;
        if (failures < 10) $display("FAIL F m=%b cn=%b s=%h a=%h b=%h f=%h exp=%h", m, cn, s, a, b, f, ef);
      end
      checks++;
      if (aeqb !== (ef == 4'hF)) failures++;
      checks++;
      if (cn4 !== ~r[4]) begin
        failures++;
        if (failures < 10) $display("FAIL Cn+4 cn=%b s=%h a=%h b=%h", cn, s, a, b);
      end
      // G' low: the operation carries out with no carry in. When it does
      // not, P' low means a carry in is passed through to the carry out.
      checks++;
      if (g_n !== ~arith_fn(s, a, b)[4]) failures++;
      if (!arith_fn(s, a, b)[4]) begin
        r = arith_fn(s, a, b) + 5'd1;
        checks++;
        if (p_n !== ~r[4]) begin
          failures++;
          if (failures < 10) $display("FAIL P' s=%h a=%h b=%h", s, a, b);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
