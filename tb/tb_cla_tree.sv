// Testbench for cla_tree at its default width (32) and at a width that is not a power of two
// (9). Random dual-rail operands and carry in; the decoded sum and carry out are compared with
// integer addition. Spacer inputs must give spacer outputs.
module tb_cla_tree;
  import stcla_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned WA = 32;
  localparam int unsigned WB = 9;

  dr_t [WA-1:0] a1, b1, s1;
  dr_t [WB-1:0] a2, b2, s2;
  dr_t cin1, cin2, co1, co2;

  cla_tree dut_a (.a(a1), .b(b1), .cin(cin1), .s(s1), .cout(co1));
  cla_tree #(.W(WB)) dut_b (.a(a2), .b(b2), .cin(cin2), .s(s2), .cout(co2));

  function automatic logic [63:0] dec(input dr_t [WA-1:0] d, input int w, output logic ok);
    logic [63:0] r = '0;
    ok = 1'b1;
    for (int n = 0; n < w; n++) begin
      r[n] = d[n].t;
      if (d[n].t == d[n].f) ok = 1'b0;
    end
    return r;
  endfunction

  task automatic run(input logic [31:0] x, input logic [31:0] y, input logic ci);
    logic [63:0] exp1, exp2, got;
    logic ok;
    for (int n = 0; n < WA; n++) begin
      a1[n] = dr_enc(x[n], 1'b1);
      b1[n] = dr_enc(y[n], 1'b1);
    end
    for (int n = 0; n < WB; n++) begin
      a2[n] = dr_enc(x[n], 1'b1);
      b2[n] = dr_enc(y[n], 1'b1);
    end
    cin1 = dr_enc(ci, 1'b1);
    cin2 = dr_enc(ci, 1'b1);
    #1;
    exp1 = 64'(x) + 64'(y) + 64'(ci);
    exp2 = 64'(x[WB-1:0]) + 64'(y[WB-1:0]) + 64'(ci);
    got = dec(s1, WA, ok);
    got[WA] = co1.t;
    checks++;
    if (!ok || co1.t == co1.f || got[WA:0] != exp1[WA:0]) begin
      failures++;
      $display("FAIL W=32 %h+%h+%b got %h", x, y, ci, got);
    end
    got = dec(WA'(s2), WB, ok);
    got[WB] = co2.t;
    checks++;
    if (!ok || co2.t == co2.f || got[WB:0] != exp2[WB:0]) begin
      failures++;
      $display("FAIL W=9 %h+%h+%b got %h", x[WB-1:0], y[WB-1:0], ci, got);
    end
  endtask

  initial begin
    run(32'hffff_ffff, 32'h0000_0000, 1'b1);
    run(32'hffff_ffff, 32'hffff_ffff, 1'b1);
    run(32'h0000_0000, 32'h0000_0000, 1'b0);
    run(32'h5555_5555, 32'haaaa_aaaa, 1'b0);
    for (int t = 0; t < 2000; t++) run($urandom, $urandom, 1'($urandom));
    a1 = '0; b1 = '0; cin1 = '0; a2 = '0; b2 = '0; cin2 = '0;
    #1;
    checks++;
    if (s1 != '0 || co1 != '0 || s2 != '0 || co2 != '0) begin
      failures++;
      $display("FAIL spacer in did not give spacer out");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
