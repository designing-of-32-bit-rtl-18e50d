// Testbench for c_block: every valid combination of the dual-rail inputs A_i, B_i, C_i, plus
// spacers on the operands and on the carry. Expected k/p/g and sum come from integer
// arithmetic on the decoded bits.
module tb_c_block;
  import stcla_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  dr_t a, b, c, s;
  kpg_t i_out;

  c_block dut (.a(a), .b(b), .c(c), .i_out(i_out), .s(s));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s a=%b b=%b c=%b i=%b s=%b", what, a, b, c, i_out, s);
    end
  endtask

  initial begin
    for (int v = 0; v < 8; v++) begin
      int sum;
      a = dr_enc(v[0], 1'b1);
      b = dr_enc(v[1], 1'b1);
      c = dr_enc(v[2], 1'b1);
      sum = int'(v[0]) + int'(v[1]) + int'(v[2]);
      #1;
      check("kill",     i_out.k == (v[1:0] == 2'b00));
      check("generate", i_out.g == (v[1:0] == 2'b11));
      check("prop",     i_out.p == (v[0] != v[1]));
      check("sum",      s.t == sum[0] && s.f == !sum[0]);
    end
    // carry still a spacer: code valid, sum stays spacer
    for (int v = 0; v < 4; v++) begin
      a = dr_enc(v[0], 1'b1);
      b = dr_enc(v[1], 1'b1);
      c = '0;
      #1;
      check("code with spacer carry", $onehot(i_out));
      check("sum spacer", s == '0);
    end
    // operands spacer
    a = '0; b = '0; c = dr_enc(1'b1, 1'b1);
    #1;
    check("spacer operands", i_out == '0 && s == '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
