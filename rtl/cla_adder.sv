// Self-timed carry-lookahead adder with single-rail ports (block A1 of the document).
//
// While start is high, in_A, in_B and in_Carry are encoded to dual rail and added in the
// C-block/D-block tree (cla_tree), which also returns the dual-rail carry out. done rises once
// all W sum pairs and the carry-out pair are valid, and falls once start is low again and the
// datapath has returned to the spacer. The single-rail results are rail 1 of each pair, so
// they read 0 while done is low. The port names follow the document; start and done are this
// design's realisation of its self-timed protocol. Combinational: in a zero-delay simulation
// done follows start at once, in silicon it rises after the data-dependent carry settling time.
module cla_adder
  import stcla_pkg::*;
#(
  parameter int unsigned W = 32
) (
  input  logic         start,
  input  logic [W-1:0] in_A,
  input  logic [W-1:0] in_B,
  input  logic         in_Carry,
  output logic [W-1:0] out_C,
  output logic         out_Carry,
  output logic         done
);

  dr_t [W-1:0] a_dr, b_dr, s_dr;
  dr_t         cin_dr, cout_dr;

  always_comb begin
    for (int unsigned n = 0; n < W; n++) begin
      a_dr[n] = dr_enc(in_A[n], start);
      b_dr[n] = dr_enc(in_B[n], start);
    end
    cin_dr = dr_enc(in_Carry, start);
  end

  cla_tree #(.W(W)) u_tree (.a(a_dr), .b(b_dr), .cin(cin_dr), .s(s_dr), .cout(cout_dr));

  always_comb begin
    for (int unsigned n = 0; n < W; n++) out_C[n] = s_dr[n].t;
    out_Carry = cout_dr.t;
  end

  completion_detect #(.W(W + 1)) u_done (.x({cout_dr, s_dr}), .done(done));

endmodule
