// Testbench for stage_latch: after reset q is zero; q takes d on an edge with en high and
// holds it on edges with en low, checked against a model register over random traffic.
module tb_stage_latch;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, en;
  logic [31:0] d, q, model;

  stage_latch dut (.clk(clk), .rst_n(rst_n), .en(en), .d(d), .q(q));

  initial begin
    rst_n = 1'b0; en = 1'b0; d = '0; model = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++;
    if (q != '0) begin
      failures++;
      $display("FAIL reset value %h", q);
    end
    for (int t = 0; t < 500; t++) begin
      en = 1'($urandom);
      d  = $urandom;
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL cycle %0d: q=%h want %h", t, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
