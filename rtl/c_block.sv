// C-block: bit cell of the self-timed carry-lookahead adder.
//
// From the dual-rail operand bits A_i and B_i it forms the one-hot carry code of the bit:
// kill k = A0 B0, generate g = A1 B1, propagate p = A0 B1 + A1 B0 (the document's Equations
// 2-4). Once the dual-rail carry C_i into the bit arrives it forms the dual-rail sum:
// S0 = A0B0C0 + A1B1C0 + A0B1C1 + A1B0C1 (Equation 5) and its dual S1 = A0B0C1 + A1B1C1 +
// A0B1C0 + A1B0C0, which the document does not print. While any input is a spacer the
// corresponding outputs stay at all-zero, so a completion detector can see when the sum is
// ready. Purely combinational; no clock.
module c_block
  import stcla_pkg::*;
(
  input  dr_t  a,      // A_i
  input  dr_t  b,      // B_i
  input  dr_t  c,      // carry into bit i
  output kpg_t i_out,  // I_i, one-hot k/p/g
  output dr_t  s       // S_i
);

  always_comb begin
    i_out.k = a.f & b.f;
    i_out.g = a.t & b.t;
    i_out.p = (a.f & b.t) | (a.t & b.f);
    s.f = (a.f & b.f & c.f) | (a.t & b.t & c.f) | (a.f & b.t & c.t) | (a.t & b.f & c.t);
    s.t = (a.f & b.f & c.t) | (a.t & b.t & c.t) | (a.f & b.t & c.f) | (a.t & b.f & c.f);
  end

endmodule
