// Testbench for d_block: every pair of one-hot group codes with both carry values, and the
// spacer. A group code is checked by what it does to a carry: kill gives 0, generate gives 1,
// propagate passes the carry. The merged code must act like the lower group followed by the
// upper group, and C_j must be the lower group's carry out.
module tb_d_block;
  import stcla_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  kpg_t i_hi, i_lo, i_out;
  dr_t  c_k, c_j;

  d_block dut (.i_hi(i_hi), .i_lo(i_lo), .c_k(c_k), .c_j(c_j), .i_out(i_out));

  function automatic kpg_t code(input int n);
    kpg_t r = '0;
    if (n == 0) r.k = 1'b1;
    else if (n == 1) r.p = 1'b1;
    else r.g = 1'b1;
    return r;
  endfunction

  function automatic logic apply(input kpg_t g, input logic cin);
    return g.g | (g.p & cin);
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s hi=%b lo=%b ck=%b cj=%b out=%b", what, i_hi, i_lo, c_k, c_j, i_out);
    end
  endtask

  initial begin
    for (int h = 0; h < 3; h++)
      for (int l = 0; l < 3; l++)
        for (int ci = 0; ci < 2; ci++) begin
          logic cin, cmid;
          cin  = ci[0];
          i_hi = code(h);
          i_lo = code(l);
          c_k  = dr_enc(cin, 1'b1);
          #1;
          cmid = apply(i_lo, cin);
          check("one-hot", $onehot(i_out));
          check("merge", apply(i_out, cin) == apply(i_hi, cmid));
          check("c_j", c_j.t == cmid && c_j.f == !cmid);
        end
    // carry spacer: code valid, carry stays spacer unless decided by the lower group
    i_hi = code(1); i_lo = code(1); c_k = '0;
    #1;
    check("propagate of spacer", c_j == '0 && i_out == code(1));
    i_lo = code(2);
    #1;
    check("generate without carry", c_j.t && !c_j.f);
    i_hi = '0; i_lo = '0;
    #1;
    check("spacer codes", i_out == '0 && c_j == '0);
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
