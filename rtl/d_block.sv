// D-block: internal node of the self-timed carry-lookahead tree.
//
// Going up the tree it merges the one-hot code of an upper group I_{i,j} with that of the
// adjacent lower group I_{j-1,k} into the code of the joined group I_{i,k}:
//   generate  = g_hi + p_hi g_lo,  kill = k_hi + p_hi k_lo,  propagate = p_hi p_lo.
// Going down it takes the dual-rail carry C_k into the lower group and returns the carry
// C_j into the upper group: rail 1 = g_lo + p_lo C_k.t, rail 0 = k_lo + p_lo C_k.f.
// The ports are the document's; the equations are the standard lookahead merge,
// which the document does not print. Spacers in give spacers out. Combinational.
module d_block
  import stcla_pkg::*;
(
  input  kpg_t i_hi,   // I_{i,j}
  input  kpg_t i_lo,   // I_{j-1,k}
  input  dr_t  c_k,    // carry into the lower group
  output dr_t  c_j,    // carry into the upper group
  output kpg_t i_out   // I_{i,k}
);

  always_comb begin
    i_out.g = i_hi.g | (i_hi.p & i_lo.g);
    i_out.k = i_hi.k | (i_hi.p & i_lo.k);
    i_out.p = i_hi.p & i_lo.p;
    c_j.t   = i_lo.g | (i_lo.p & c_k.t);
    c_j.f   = i_lo.k | (i_lo.p & c_k.f);
  end

endmodule
