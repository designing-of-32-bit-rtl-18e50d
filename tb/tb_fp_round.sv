// Testbench for fp_round. The significand product is formed from two random normal
// significands; the expected result is found by locating the leading one, comparing the
// discarded remainder with one half (ties to even, with exact ties forced), renormalising a carry and applying the
// exponent range: 255 or more gives infinity, 0 or less gives +0. Exponents sweep the whole
// range so that overflow and underflow occur; the flag inputs are checked as well.
module tb_fp_round;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int n_shift = 0, n_noshift = 0, n_round = 0, n_rcarry = 0, n_ovf = 0, n_unf = 0, n_tie = 0;

  logic        start, sign, zero_in, inf_in, nan_in, done;
  logic [9:0]  e_unb;
  logic [47:0] p;
  logic [31:0] z;

  fp_round dut (
    .start(start), .sign(sign), .e_unb(e_unb), .p(p), .zero_in(zero_in), .inf_in(inf_in),
    .nan_in(nan_in), .z(z), .done(done)
  );

  function automatic logic [31:0] expect_z(input logic s, input int e, input longint unsigned pp);
    int msb, sh;
    longint unsigned q, rem, half;
    int ex;
    msb = 0;
    for (int n = 0; n < 48; n++) if (pp[n]) msb = n;
    sh   = msb - 23;
    q    = pp >> sh;
    rem  = pp - (q << sh);
    half = 64'd1 << (sh - 1);
    ex   = e + (msb - 46);
    if (msb == 47) n_shift++; else n_noshift++;
    if (rem == half) n_tie++;
    if (rem > half || (rem == half && q[0])) begin
      q++;
      n_round++;
    end
    if (q == (64'd1 << 24)) begin
      q = q >> 1;
      ex++;
      n_rcarry++;
    end
    if (ex >= 255) begin
      n_ovf++;
      return {s, 8'hff, 23'b0};
    end
    if (ex <= 0) begin
      n_unf++;
      return 32'h0;
    end
    return {s, 8'(ex), q[22:0]};
  endfunction

  task automatic run(input logic s, input int e, input longint unsigned pp,
                     input logic zf, input logic inf, input logic nan, input logic [31:0] want);
    sign = s; e_unb = 10'(e); p = pp[47:0]; zero_in = zf; inf_in = inf; nan_in = nan;
    start = 1'b0;
    #1;
    checks++;
    if (done) begin
      failures++;
      $display("FAIL done without start");
    end
    start = 1'b1;
    #1;
    checks++;
    if (!done || z != want) begin
      failures++;
      $display("FAIL s=%b e=%0d p=%h: z=%h want %h done=%b", s, e, pp, z, want, done);
    end
  endtask

  initial begin
    longint unsigned pp;
    int e;
    logic s;
    // significand 1.11..1 with guard set: rounds up into 10.0
    pp = longint'(24'h803039) * longint'(24'hff9fb2);
    run(1'b0, 0, pp, 1'b0, 1'b0, 1'b0, expect_z(1'b0, 0, pp));
    for (int t = 0; t < 4000; t++) begin
      pp = longint'({1'b1, 23'($urandom)}) * longint'({1'b1, 23'($urandom)});
      if (t % 8 == 0) pp[22:0] = 23'h40_0000;   // exact tie if the product is below 2
      if (t % 8 == 1) pp[23:0] = 24'h80_0000;   // exact tie if the product is 2 or more
      e = $urandom_range(384) - 128;
      s = 1'($urandom);
      run(s, e, pp, 1'b0, 1'b0, 1'b0, expect_z(s, e, pp));
    end
    run(1'b1, 10, 48'h4000_0000_0000, 1'b1, 1'b0, 1'b0, 32'h0000_0000);
    run(1'b1, 10, 48'h4000_0000_0000, 1'b0, 1'b1, 1'b0, 32'hff80_0000);
    run(1'b0, 10, 48'h4000_0000_0000, 1'b0, 1'b0, 1'b1, 32'h7fc0_0000);
    $display("shift=%0d noshift=%0d round=%0d tie=%0d rcarry=%0d ovf=%0d unf=%0d",
             n_shift, n_noshift, n_round, n_tie, n_rcarry, n_ovf, n_unf);
    checks++;
    if (n_shift == 0 || n_noshift == 0 || n_round == 0 || n_tie == 0 || n_rcarry == 0 || n_ovf == 0 || n_unf == 0) begin
      failures++;
      $display("FAIL a rounding or range case never occurred");
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
