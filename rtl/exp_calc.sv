// Exponent calculator (block A0 of the document).
//
// Adds the biased exponents of the two IEEE-754 single operands, e = Ea + Eb, in an 8-bit
// self-timed CLA whose carry out is bit 8 of e, then removes one bias in a second, 10-bit CLA
// by adding the two's complement of 127: e_unb = Ea + Eb - 127, a signed 10-bit exponent of
// the unnormalised product. The second adder is started by the first one's done, so done marks
// the completion of both. The ports a, b, start and e(8:0) are the document's; e_unb and done
// and the split into two adders are this design's own. Only the exponent fields of a and b
// are read; the ports keep the full operand width the document gives them. Combinational;
// outputs read 0 while start is low.
module exp_calc
  import stcla_pkg::*;
(
  input  logic        start,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [8:0]  e,      // Ea + Eb
  output logic [9:0]  e_unb,  // Ea + Eb - 127, two's complement
  output logic        done
);

  localparam logic [9:0] MINUS_BIAS = 10'(-FP_BIAS);

  logic [FP_EXP_W-1:0] sum8;
  logic                c8, done_sum, done_bias, c10;

  cla_adder #(.W(FP_EXP_W)) u_sum (
    .start(start), .in_A(a[30:23]), .in_B(b[30:23]), .in_Carry(1'b0),
    .out_C(sum8), .out_Carry(c8), .done(done_sum)
  );

  assign e = {c8, sum8};

  cla_adder #(.W(10)) u_bias (
    .start(start & done_sum), .in_A({1'b0, e}), .in_B(MINUS_BIAS), .in_Carry(1'b0),
    .out_C(e_unb), .out_Carry(c10), .done(done_bias)
  );

  assign done = done_bias;

  // c10 (the carry out of the bias subtraction) only tells whether Ea + Eb >= 127; the sign
  // of e_unb already carries that information.
  logic unused_c10;
  assign unused_c10 = c10;

endmodule
