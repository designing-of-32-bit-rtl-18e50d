// Normalise, round and pack the product of two IEEE-754 single-precision numbers.
//
// The 48-bit significand product p of two normal numbers lies in [1,4). If its top bit is set
// the significand is p[47:24] and the exponent is raised by one, else it is p[46:23]. The bit
// below the kept ones (guard) and the OR of all lower bits (sticky) decide round-to-nearest,
// ties to even; the increment is done in a 24-bit self-timed CLA, and a carry out of it
// (significand 1.111..1 rounded up) renormalises to 1.000..0 with one more exponent step.
// A 10-bit CLA adds both exponent steps to e_unb; it is started by the rounding adder's done,
// and done marks the completion of both. Then: NaN gives the quiet NaN 7fc00000, an infinite
// operand or an exponent of 255 or more gives a signed infinity, and a zero operand or an
// exponent of 0 or less gives +0. Rounding to nearest and +0 on underflow match the results
// the document prints; the rest of the exception handling is this design's own choice.
// Combinational.
module fp_round
  import stcla_pkg::*;
(
  input  logic        start,
  input  logic        sign,
  input  logic [9:0]  e_unb,   // Ea + Eb - 127, two's complement
  input  logic [47:0] p,       // significand product
  input  logic        zero_in, // an operand is zero or subnormal
  input  logic        inf_in,  // an operand is infinite
  input  logic        nan_in,  // an operand is NaN, or infinity times zero
  output logic [31:0] z,
  output logic        done
);

  logic              norm_shift, guard, sticky, round_up;
  logic [FP_SIG_W-1:0] sig, sig_rnd;
  logic              rnd_carry, done_rnd, done_exp, exp_carry;
  logic [9:0]        e_fin;
  logic [FP_FRAC_W-1:0] frac;

  always_comb begin
    norm_shift = p[47];
    if (norm_shift) begin
      sig    = p[47:24];
      guard  = p[23];
      sticky = |p[22:0];
    end else begin
      sig    = p[46:23];
      guard  = p[22];
      sticky = |p[21:0];
    end
    round_up = guard & (sticky | sig[0]);
  end

  cla_adder #(.W(FP_SIG_W)) u_rnd (
    .start(start), .in_A(sig), .in_B('0), .in_Carry(round_up),
    .out_C(sig_rnd), .out_Carry(rnd_carry), .done(done_rnd)
  );

  cla_adder #(.W(10)) u_exp (
    .start(start & done_rnd), .in_A(e_unb), .in_B({9'b0, norm_shift}), .in_Carry(rnd_carry),
    .out_C(e_fin), .out_Carry(exp_carry), .done(done_exp)
  );

  // After a rounding carry the significand is exactly 1.0, whose fraction is zero.
  assign frac = rnd_carry ? '0 : sig_rnd[FP_FRAC_W-1:0];
  assign done = done_exp;

  always_comb begin
    if (nan_in)                                  z = 32'h7fc0_0000;
    else if (inf_in)                             z = {sign, 8'hff, 23'b0};
    else if (zero_in)                            z = 32'h0000_0000;
    else if (!e_fin[9] && e_fin[8:0] >= 9'd255)  z = {sign, 8'hff, 23'b0};
    else if (e_fin[9] || e_fin == 10'd0)         z = 32'h0000_0000;
    else                                         z = {sign, e_fin[7:0], frac};
  end

  // The exponent carry out is the wrap of the two's complement sum and carries no information.
  logic unused_exp_carry;
  assign unused_exp_carry = exp_carry;

endmodule
