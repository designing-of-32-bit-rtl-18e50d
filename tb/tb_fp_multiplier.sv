// End-to-end testbench for fp_multiplier at its default parameters.
//
// Phase 1 sends the products printed as examples for this design one at a time, plus
// corner operands, and checks each result and the latency: with an idle pipeline and an
// immediate acknowledge, done rises 3 clock edges after the edge that loads the operands.
// Phase 2 streams random operands with random producer and consumer delays, so that the
// pipeline overlaps two operations and the consumer holds results back. Every result is
// compared with an integer reference model (round to nearest even, +0 on underflow, subnormal
// inputs as zero). Counted mechanisms, each of which must occur: significand product in
// [2,4) (normalising shift) and in [1,2), rounding up, rounding carry into the exponent,
// overflow to infinity, underflow to zero, zero operand, infinite operand, NaN, a held result
// (back-pressure) and both stages busy at once.
module tb_fp_multiplier;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, start, ack, done, done_ack;
  logic [31:0] a, b, c;

  fp_multiplier dut (
    .clk(clk), .rst_n(rst_n), .start(start), .ack(ack), .a(a), .b(b), .c(c), .done(done),
    .done_ack(done_ack)
  );

  typedef enum int {M_SHIFT, M_NOSHIFT, M_ROUND, M_RCARRY, M_OVF, M_UNF, M_ZERO, M_INF, M_NAN,
                    M_STALL, M_OVERLAP, M_COUNT} mech_t;
  int    mech [M_COUNT];
  string mech_name [M_COUNT] = '{"normalising shift", "no shift", "round up", "rounding carry",
                                 "overflow", "underflow", "zero operand", "infinite operand",
                                 "NaN", "held result", "both stages busy"};

  function automatic logic [31:0] ref_mul(input logic [31:0] x, input logic [31:0] y);
    logic s;
    int ex, ey, e, msb, sh;
    longint unsigned mx, my, pp, q, rem, half;
    logic x_nan, y_nan, x_inf, y_inf, x_zero, y_zero;
    s  = x[31] ^ y[31];
    ex = int'(x[30:23]);
    ey = int'(y[30:23]);
    x_nan  = ex == 255 && x[22:0] != 0;  y_nan  = ey == 255 && y[22:0] != 0;
    x_inf  = ex == 255 && x[22:0] == 0;  y_inf  = ey == 255 && y[22:0] == 0;
    x_zero = ex == 0;                    y_zero = ey == 0;
    if (x_nan || y_nan || (x_inf && y_zero) || (y_inf && x_zero)) begin
      mech[M_NAN]++;
      return 32'h7fc0_0000;
    end
    if (x_inf || y_inf) begin
      mech[M_INF]++;
      return {s, 8'hff, 23'b0};
    end
    if (x_zero || y_zero) begin
      mech[M_ZERO]++;
      return 32'h0;
    end
    mx = {40'b1, x[22:0]};
    my = {40'b1, y[22:0]};
    pp = mx * my;
    msb = pp[47] ? 47 : 46;
    if (msb == 47) mech[M_SHIFT]++; else mech[M_NOSHIFT]++;
    sh   = msb - 23;
    q    = pp >> sh;
    rem  = pp & ((64'd1 << sh) - 1);
    half = 64'd1 << (sh - 1);
    e    = ex + ey - 127 + (msb - 46);
    if (rem > half || (rem == half && q[0])) begin
      q++;
      mech[M_ROUND]++;
    end
    if (q[24]) begin
      q >>= 1;
      e++;
      mech[M_RCARRY]++;
    end
    if (e >= 255) begin
      mech[M_OVF]++;
      return {s, 8'hff, 23'b0};
    end
    if (e <= 0) begin
      mech[M_UNF]++;
      return 32'h0;
    end
    return {s, 8'(e), q[22:0]};
  endfunction

  task automatic check(input string what, input logic ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (done && !done_ack) mech[M_STALL]++;
    if (dut.start1 && dut.start2) mech[M_OVERLAP]++;
  end

  // One operation on an idle pipeline, immediate acknowledge; checks result and latency.
  task automatic single(input logic [31:0] x, input logic [31:0] y, input logic [31:0] printed);
    int edges;
    logic [31:0] want;
    want = ref_mul(x, y);
    if (printed != want) begin
      checks++;
      failures++;
      $display("FAIL reference model gives %h where %h is expected", want, printed);
    end
    a <= x; b <= y; start <= 1'b1;
    do @(posedge clk); while (!ack);  // ack rises at the loading edge
    start <= 1'b0;
    edges = 0;
    do begin
      @(posedge clk);
      edges++;
    end while (!done);
    check($sformatf("latency %0d edges", edges), edges == 3);
    check($sformatf("%h * %h = %h (got %h)", x, y, want, c), c == want);
    done_ack <= 1'b1;
    do @(posedge clk); while (done);
    done_ack <= 1'b0;
    @(posedge clk);
  endtask

  localparam int NSTREAM = 3000;
  logic [31:0] exp_q [$];

  function automatic logic [31:0] rand_operand();
    logic [31:0] v;
    int kind;
    v = $urandom;
    kind = $urandom_range(19);
    unique case (kind)
      0: v[30:23] = 8'h00;                        // zero
      1: begin v[30:23] = 8'hff; v[22:0] = '0; end  // infinity
      2: v[30:23] = 8'hff;                        // NaN (almost always)
      3, 4: v[30:23] = 8'($urandom_range(40, 1));     // small: underflow
      5, 6: v[30:23] = 8'($urandom_range(254, 200));  // large: overflow
      default: v[30:23] = 8'($urandom_range(190, 64));
    endcase
    return v;
  endfunction

  initial begin
    rst_n = 1'b0; start = 1'b0; done_ack = 1'b0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // products printed as examples for this design
    single(32'hc190_0000, 32'h4118_0000, 32'hc32b_0000);  // -18 * 9.5 = -171
    single(32'hd190_0000, 32'h4213_1000, 32'hd425_7200);
    single(32'ha345_0000, 32'h111c_2000, 32'h0000_0000);  // underflow
    single(32'h7243_1020, 32'h411d_2002, 32'h73ef_728e);
    single(32'h4243_1020, 32'h611d_2002, 32'h63ef_728e);
    single(32'hc243_1829, 32'hc116_9271, 32'h43e5_7f84);  // needs rounding up
    // corner operands
    single(32'h3f80_3039, 32'h3fff_9fb2, 32'h4000_0000);  // rounding carry
    single(32'h7f00_0000, 32'h4100_0000, 32'h7f80_0000);  // overflow
    single(32'h0000_0000, 32'hc000_0000, 32'h0000_0000);  // zero operand
    single(32'hff80_0000, 32'h4000_0000, 32'hff80_0000);  // infinity
    single(32'h7f80_0000, 32'h0000_0000, 32'h7fc0_0000);  // infinity * zero
    // streaming phase
    fork
      begin : producer
        for (int t = 0; t < NSTREAM; t++) begin
          logic [31:0] x, y;
          x = rand_operand();
          y = rand_operand();
          exp_q.push_back(ref_mul(x, y));
          repeat ($urandom_range(1)) @(posedge clk);
          a <= x; b <= y; start <= 1'b1;
          do @(posedge clk); while (!ack);
          start <= 1'b0;
          do @(posedge clk); while (ack);
        end
      end
      begin : consumer
        for (int t = 0; t < NSTREAM; t++) begin
          logic [31:0] want;
          do @(posedge clk); while (!done);
          want = exp_q.pop_front();
          check($sformatf("stream %0d: got %h want %h", t, c, want), c == want);
          repeat ($urandom_range(3)) @(posedge clk);
          done_ack <= 1'b1;
          do @(posedge clk); while (done);
          done_ack <= 1'b0;
        end
      end
    join
    foreach (mech[m]) begin
      $display("%-18s %0d", mech_name[m], mech[m]);
      check({"mechanism ", mech_name[m]}, mech[m] > 0);
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
