// Stage latch of the self-timed pipeline.
//
// Holds the data word of one pipeline stage. It loads d on the clock edge at which the
// stage's control unit raises en and holds it otherwise, so the processing unit behind it sees
// stable operands for as long as the stage is busy. The document draws these as latches
// enabled by the control unit; an edge-triggered register with enable and reset to zero is
// this design's realisation. One cycle from en to q.
module stage_latch #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (en) q <= d;
  end

endmodule
