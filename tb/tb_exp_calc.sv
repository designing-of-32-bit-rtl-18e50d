// Testbench for exp_calc: every pair of 8-bit exponents (with random signs and fractions)
// must give e = Ea + Eb and e_unb = Ea + Eb - 127 as a 10-bit two's complement number, with
// done high; with start low done must be low.
module tb_exp_calc;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, done;
  logic [31:0] a, b;
  logic [8:0]  e;
  logic [9:0]  e_unb;

  exp_calc dut (.start(start), .a(a), .b(b), .e(e), .e_unb(e_unb), .done(done));

  initial begin
    for (int ea = 0; ea < 256; ea++)
      for (int eb = 0; eb < 256; eb++) begin
        int want;
        a = {1'($urandom), 8'(ea), 23'($urandom)};
        b = {1'($urandom), 8'(eb), 23'($urandom)};
        start = 1'b0;
        #1;
        checks++;
        if (done) begin
          failures++;
          $display("FAIL done high without start");
        end
        start = 1'b1;
        #1;
        want = ea + eb - 127;
        checks++;
        if (!done || e != 9'(ea + eb) || $signed(e_unb) != want) begin
          failures++;
          $display("FAIL %0d+%0d: e=%0d e_unb=%0d done=%b", ea, eb, e, $signed(e_unb), done);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
