// Completion detector for a dual-rail word.
//
// done is high when every dual-rail pair of x has left the spacer, that is when one of its
// two rails is high; it falls as soon as any pair returns to the spacer. This is the done flag
// of the self-timed datapath, which the document derives from the redundant encoding; the
// AND-of-ORs form is this design's reading of it. Combinational.
module completion_detect
  import stcla_pkg::*;
#(
  parameter int unsigned W = 33
) (
  input  dr_t [W-1:0] x,
  output logic        done
);

  always_comb begin
    done = 1'b1;
    for (int unsigned n = 0; n < W; n++) done &= dr_valid(x[n]);
  end

endmodule
