// Significand multiplier: an array of self-timed carry-lookahead adders.
//
// Forms the 2N-bit product of two N-bit significands (N = 24: 23 fraction bits and the hidden
// bit). Partial product i is x AND y[i]. Row 0 is partial product 0; row i (1..N-1) adds
// partial product i to the running sum shifted right by one, in an N-bit CLA whose carry out
// becomes the top bit of the row. The bit shifted out of each row is product bit i; the last
// row gives the upper N+1 product bits. Each row's adder is started by the previous row's
// done, so done marks the completion of the whole array, just as a self-timed cascade passes
// completion on. The document describes the significand multiplier as groups of units wired
// into a network; the carry-propagate array is this design's reading of that. Combinational.
module mant_mult
  import stcla_pkg::*;
#(
  parameter int unsigned N = FP_SIG_W
) (
  input  logic             start,
  input  logic [N-1:0]     x,
  input  logic [N-1:0]     y,
  output logic [2*N-1:0]   p,
  output logic             done
);

  logic [N:0]   row  [0:N-1];  // running sum after each row, N+1 bits
  logic [N-1:0] rdone;         // completion of each row

  assign row[0]   = {1'b0, x & {N{y[0]}}};
  assign rdone[0] = start;

  for (genvar i = 1; i < N; i++) begin : g_row
    cla_adder #(.W(N)) u_add (
      .start(rdone[i-1]), .in_A(row[i-1][N:1]), .in_B(x & {N{y[i]}}), .in_Carry(1'b0),
      .out_C(row[i][N-1:0]), .out_Carry(row[i][N]), .done(rdone[i])
    );
  end

  for (genvar i = 0; i < N - 1; i++) begin : g_low
    assign p[i] = row[i][0];
  end
  assign p[2*N-1:N-1] = row[N-1];
  assign done         = rdone[N-1];

endmodule
