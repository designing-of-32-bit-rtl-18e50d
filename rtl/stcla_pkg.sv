// Shared types and constants of the self-timed carry-lookahead floating-point multiplier.
//
// dr_t is a dual-rail bit: a logical 1 is (t,f) = (1,0), a logical 0 is (0,1), and (0,0) is the
// spacer that the datapath returns to between operations. (1,1) never occurs. kpg_t is the
// one-hot kill/propagate/generate code that the C-blocks and D-blocks pass up the lookahead tree;
// all-zero is its spacer. Dual-rail data and one-hot internal codes follow the document; the
// field names and the helper functions are this design's own.
package stcla_pkg;

  typedef struct packed {
    logic t;  // rail 1: the bit is 1
    logic f;  // rail 0: the bit is 0
  } dr_t;

  typedef struct packed {
    logic k;  // carry kill
    logic p;  // carry propagate
    logic g;  // carry generate
  } kpg_t;


  // IEEE-754 single precision field sizes and bias
  localparam int unsigned FP_EXP_W  = 8;
  localparam int unsigned FP_FRAC_W = 23;
  localparam int unsigned FP_SIG_W  = FP_FRAC_W + 1;
  localparam int unsigned FP_BIAS   = 127;

  // Encode a single-rail bit; a low valid gives the spacer.
  function automatic dr_t dr_enc(input logic v, input logic valid);
    dr_enc.t = valid & v;
    dr_enc.f = valid & ~v;
  endfunction

  // A dual-rail bit has left the spacer.
  function automatic logic dr_valid(input dr_t d);
    return d.t | d.f;
  endfunction

endpackage
