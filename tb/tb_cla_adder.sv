// Testbench for cla_adder at its default 32 bits: with start high the sum and carry out must
// equal integer addition and done must be high; with start low the outputs must be all zero
// (the spacer) and done low. Corner cases plus random operands.
module tb_cla_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        start, cin, cout, done;
  logic [31:0] x, y, s;

  cla_adder dut (
    .start(start), .in_A(x), .in_B(y), .in_Carry(cin), .out_C(s), .out_Carry(cout), .done(done)
  );

  task automatic run(input logic [31:0] xa, input logic [31:0] ya, input logic ca);
    logic [32:0] expect_sum;
    x = xa; y = ya; cin = ca; start = 1'b0;
    #1;
    checks++;
    if (done || s != '0 || cout) begin
      failures++;
      $display("FAIL spacer: done=%b s=%h", done, s);
    end
    start = 1'b1;
    #1;
    expect_sum = 33'(xa) + 33'(ya) + 33'(ca);
    checks++;
    if (!done || {cout, s} != expect_sum) begin
      failures++;
      $display("FAIL %h+%h+%b: got %b %h done=%b", xa, ya, ca, cout, s, done);
    end
  endtask

  initial begin
    run(32'hffff_ffff, 32'h0, 1'b1);
    run(32'hffff_ffff, 32'hffff_ffff, 1'b0);
    run(32'h8000_0000, 32'h8000_0000, 1'b0);
    run(32'h0, 32'h0, 1'b0);
    for (int t = 0; t < 3000; t++) run($urandom, $urandom, 1'($urandom));
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
