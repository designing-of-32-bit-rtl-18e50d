// Testbench for completion_detect: all-valid words must give done, a word with any pair in
// the spacer (one pair or all) must not.
module tb_completion_detect;
  import stcla_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned W = 33;
  dr_t [W-1:0] x;
  logic done;

  completion_detect dut (.x(x), .done(done));

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s x=%h done=%b", what, x, done);
    end
  endtask

  initial begin
    x = '0;
    #1 check("all spacer", !done);
    for (int t = 0; t < 500; t++) begin
      int hole;
      for (int n = 0; n < W; n++) x[n] = dr_enc(1'($urandom), 1'b1);
      #1 check("all valid", done);
      hole = $urandom_range(W - 1);
      x[hole] = '0;
      #1 check("one spacer", !done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
