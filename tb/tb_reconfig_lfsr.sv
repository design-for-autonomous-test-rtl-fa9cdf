// tb_reconfig_lfsr: checks the three modes of the reconfigurable LFSR.
//
// Two instances: the 3-stage default (taps at stages 2 and 3) and a
// 4-stage one (taps at stages 3 and 4). For each:
//  - register mode (n = 1) loads random inputs unchanged;
//  - generator mode (n = 0, s = 0), started from zero, visits all 2^W
//    states exactly once before returning to zero;
//  - signature mode (n = 0, s = 1) matches a reference that XORs each
//    input into its stage of the shifted register;
//  - clear empties the register.
module tb_reconfig_lfsr;
  logic clk = 0, rst_n = 0, clear = 0, n = 1, s = 0;
  logic [2:0] x3, q3;
  logic [3:0] x4, q4;
  int checks = 0, failures = 0;

  reconfig_lfsr u3 (.clk(clk), .rst_n(rst_n), .clear(clear), .n(n), .s(s), .x(x3), .q(q3));
  reconfig_lfsr #(.WIDTH(4), .TAPS(4'b1100)) u4 (
    .clk(clk), .rst_n(rst_n), .clear(clear), .n(n), .s(s), .x(x4), .q(q4));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    logic [2:0] e3;
    logic [3:0] e4;
    bit seen3 [8];
    bit seen4 [16];
    x3 = '0; x4 = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Register mode.
    for (int i = 0; i < 20; i++) begin
      x3 = 3'($urandom); x4 = 4'($urandom);
      @(posedge clk); #1;
      check(q3 == x3 && q4 == x4, "register mode load");
    end
    // Clear.
    clear = 1; @(posedge clk); #1; clear = 0;
    check(q3 == 0 && q4 == 0, "clear");
    // Generator mode: complete sequences.
    n = 0; s = 0;
    for (int i = 0; i < 8; i++) begin
      check(!seen3[q3], "3-bit state repeated early");
      seen3[q3] = 1;
      @(posedge clk); #1;
    end
    check(q3 == 0, "3-bit sequence returns to zero after 8 steps");
    clear = 1; @(posedge clk); #1; clear = 0;
    for (int i = 0; i < 16; i++) begin
      check(!seen4[q4], "4-bit state repeated early");
      seen4[q4] = 1;
      @(posedge clk); #1;
    end
    check(q4 == 0, "4-bit sequence returns to zero after 16 steps");
    // Signature mode against a reference.
    s = 1;
    e3 = q3; e4 = q4;
    for (int i = 0; i < 50; i++) begin
      x3 = 3'($urandom); x4 = 4'($urandom);
      e3 = {e3[1] ^ x3[2], e3[0] ^ x3[1], e3[1] ^ e3[2] ^ x3[0]};
      e4 = {e4[2] ^ x4[3], e4[1] ^ x4[2], e4[0] ^ x4[1], e4[2] ^ e4[3] ^ x4[0]};
      @(posedge clk); #1;
      check(q3 == e3, "3-bit signature step");
      check(q4 == e4, "4-bit signature step");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
