// tb_alu181_n1: exhaustive check of one N1 slice.
//
// All 64 combinations of (A, B, S) are applied. The expected HI and LI are
// derived from the 74181 function table rather than the gate equations:
// NOT LI is the select-dependent "X" operand bit (A, A+B, A+B', 1 for
// S1S0 = 00, 01, 10, 11) and NOT HI the "Y" operand bit (0, A.B', A.B, A
// for S3S2 = 00, 01, 10, 11). It also checks that HI depends only on
// S2/S3 and LI only on S0/S1, and that (HI, LI) is never 01.
module tb_alu181_n1;
  logic a, b, h, l;
  logic [3:0] s;
  int checks = 0, failures = 0;

  alu181_n1 dut (.a(a), .b(b), .s(s), .h(h), .l(l));

  function automatic logic x_op(input logic a_, b_, input logic [1:0] s10);
    case (s10)
      2'b00: return a_;
      2'b01: return a_ | b_;
      2'b10: return a_ | ~b_;
      default: return 1'b1;
    endcase
  endfunction
  function automatic logic y_op(input logic a_, b_, input logic [1:0] s32);
    case (s32)
      2'b00: return 1'b0;
      2'b01: return a_ & ~b_;
      2'b10: return a_ & b_;
      default: return a_;
    endcase
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 64; v++) begin
      {s, a, b} = v[5:0];
      #1;
      checks++;
      if (l !== ~x_op(a, b, s[1:0])) begin
        failures++; $display("FAIL LI a=%b b=%b s=%b l=%b", a, b, s, l);
      end
      checks++;
      if (h !== ~y_op(a, b, s[3:2])) begin
        failures++; $display("FAIL HI a=%b b=%b s=%b h=%b", a, b, s, h);
      end
      checks++;
      if ({h, l} == 2'b01) begin
        failures++; $display("FAIL (HI,LI)=01 a=%b b=%b s=%b", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
