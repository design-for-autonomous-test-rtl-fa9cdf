// tb_output_sa: checks the output register / signature analyzer.
//
// Normal mode must register the ALU outputs unchanged. In signature mode
// the register is compared, cycle by cycle, with a reference written from
// the stage table (stage 1 F0, 2 F1, 3 A=B, 4 F2, 5 F3, 6 P', 7 Cn+4,
// 8 G'; feedback from stages 8, 6, 5, 4 into stage 1). Finally a single
// flipped output bit in a 200-cycle stream must change the signature.
module tb_output_sa;
  import bist181_pkg::*;
  logic clk = 0, rst_n = 0, normal = 1, clear = 0;
  alu_out_t d, q;
  logic [7:0] y;
  int checks = 0, failures = 0;

  output_sa dut (.clk(clk), .rst_n(rst_n), .normal(normal), .clear(clear), .d(d), .y(y), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Reference signature step; stage k is bit k of st (bit 0 unused).
  function automatic logic [8:0] ref_step(input logic [8:0] st, input alu_out_t v);
    logic [8:0] in, nx;
    in = {v.g_n, v.cn4, v.p_n, v.f[3], v.f[2], v.aeqb, v.f[1], v.f[0], 1'b0};
    nx[0] = 1'b0;
    nx[1] = in[1] ^ st[8] ^ st[6] ^ st[5] ^ st[4];
    for (int k = 2; k <= 8; k++) nx[k] = in[k] ^ st[k-1];
    return nx;
  endfunction

  initial begin
    logic [8:0] e;
    logic [7:0] sig_good;
    alu_out_t stream [200];
    d = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 30; i++) begin
      d = alu_out_t'($urandom);
      @(posedge clk); #1;
      check(q == d, "normal mode registers the ALU outputs");
    end
    clear = 1; @(posedge clk); #1; clear = 0;
    check(y == 0, "clear");
    normal = 0;
    e = '0;
    for (int i = 0; i < 200; i++) begin
      stream[i] = alu_out_t'($urandom);
      d = stream[i];
      e = ref_step(e, d);
      @(posedge clk); #1;
      check(y == e[8:1], "signature step");
    end
    sig_good = y;
    // Same stream with one bit of one result flipped.
    clear = 1; @(posedge clk); #1; clear = 0;
    for (int i = 0; i < 200; i++) begin
      d = stream[i];
      if (i == 77) d.f[2] = ~d.f[2];
      @(posedge clk); #1;
    end
    check(y != sig_good, "single-bit error changes the signature");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
