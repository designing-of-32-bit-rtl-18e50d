// Testbench for ctrl_unit: a producer, a processing unit model and a consumer, each with
// random delays, pass 200 numbered tokens through one stage. Checks: every token is loaded
// exactly once (one en pulse), reaches the consumer in order and unchanged, req_out is only
// high after done, start stays high while req_out is high, and start is never high in IDLE
// after the token has left. The four-phase rules are also asserted inside the unit.
module tb_ctrl_unit;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NTOK = 200;

  logic rst_n, req_in, ack_out, en, start, done, req_out, ack_in;
  int   data_in, latch_q;
  int   en_count = 0, stalls = 0;

  ctrl_unit dut (
    .clk(clk), .rst_n(rst_n), .req_in(req_in), .ack_out(ack_out), .en(en), .start(start),
    .done(done), .req_out(req_out), .ack_in(ack_in)
  );

  // stage latch and processing unit model: done follows start after a random delay
  always_ff @(posedge clk) if (en) latch_q <= data_in;
  always_ff @(posedge clk) if (en) en_count <= en_count + 1;

  initial begin
    done = 1'b0;
    forever begin
      @(posedge clk);
      if (start && !done) begin
        repeat ($urandom_range(3)) @(posedge clk);
        done <= 1'b1;
      end else if (!start && done) begin
        repeat ($urandom_range(2)) @(posedge clk);
        done <= 1'b0;
      end
    end
  end

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // protocol monitor
  always @(posedge clk) if (rst_n) begin
    if (req_out) check("req_out only with done", done);
    if (req_out) check("start held while req_out", start);
    if (req_out && !ack_in) stalls++;
  end

  // producer
  initial begin
    rst_n = 1'b0; req_in = 1'b0; data_in = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int t = 0; t < NTOK; t++) begin
      repeat ($urandom_range(2)) @(posedge clk);
      data_in <= t;
      req_in  <= 1'b1;
      do @(posedge clk); while (!ack_out);
      req_in  <= 1'b0;
      data_in <= -1;
      do @(posedge clk); while (ack_out);
    end
  end

  // consumer
  initial begin
    ack_in = 1'b0;
    for (int t = 0; t < NTOK; t++) begin
      do @(posedge clk); while (!req_out);
      check("token order", latch_q == t);
      repeat ($urandom_range(3)) @(posedge clk);
      ack_in <= 1'b1;
      do @(posedge clk); while (req_out);
      ack_in <= 1'b0;
    end
    repeat (5) @(posedge clk);
    check("one en per token", en_count == NTOK);
    check("back-pressure seen", stalls > 0);
    $display("tokens=%0d en=%0d stall_cycles=%0d", NTOK, en_count, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
