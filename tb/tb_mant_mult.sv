// Testbench for mant_mult at its default 24 bits: corner significands and random ones
// (normal, with the hidden bit set, and arbitrary) against the 64-bit integer product; done
// must be high with start and low without it.
module tb_mant_mult;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int unsigned N = 24;
  logic           start, done;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;

  mant_mult dut (.start(start), .x(x), .y(y), .p(p), .done(done));

  task automatic run(input logic [N-1:0] xa, input logic [N-1:0] ya);
    longint unsigned want;
    x = xa; y = ya; start = 1'b0;
    #1;
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done without start");
    end
    start = 1'b1;
    #1;
    want = longint'(xa) * longint'(ya);
    checks++;
    if (!done || 64'(p) != want) begin
      failures++;
      $display("FAIL %h*%h: got %h want %h done=%b", xa, ya, p, want, done);
    end
  endtask

  initial begin
    run('1, '1);
    run(24'h80_0000, 24'h80_0000);
    run(24'h0, 24'hff_ffff);
    run(24'hc0_0000, 24'h98_0000);
    for (int t = 0; t < 2000; t++) run({1'b1, 23'($urandom)}, {1'b1, 23'($urandom)});
    for (int t = 0; t < 1000; t++) run(24'($urandom), 24'($urandom));
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
