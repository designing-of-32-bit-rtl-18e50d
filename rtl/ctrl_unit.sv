// Control unit of one stage of the self-timed pipeline.
//
// It joins the request/acknowledge handshake with the previous stage (req_in, ack_out), the
// one with the next stage (req_out, ack_in) and the start/done pair of its processing unit,
// using four-phase (return-to-zero) signalling:
//   IDLE : when req_in is high (and the previous token has been released) raise en for one
//          cycle to load the stage latch, and raise ack_out.
//   BUSY : start is high; wait for the processing unit's done.
//   OUT  : start and req_out are high; the result is held until ack_in rises.
//   RTZ  : start and req_out are low, so the dual-rail processing unit returns to its spacer;
//          wait for ack_in and done to fall, then go back to IDLE.
// ack_out stays high from the loading edge until req_in falls. The sequence en, ack, start,
// done, req is the document's; the document's control is asynchronous, and this clocked state
// machine, with one cycle per step, is this design's realisation of it. A stage can take a new
// token as soon as the next stage has acknowledged the previous one.
module ctrl_unit (
  input  logic clk,
  input  logic rst_n,
  input  logic req_in,
  output logic ack_out,
  output logic en,
  output logic start,
  input  logic done,
  output logic req_out,
  input  logic ack_in
);

  typedef enum logic [1:0] {IDLE, BUSY, OUT, RTZ} state_t;

  state_t state, state_nx;
  logic   ack_r;

  assign en      = (state == IDLE) && req_in && !ack_r;
  assign start   = (state == BUSY) || (state == OUT);
  assign req_out = (state == OUT);
  assign ack_out = ack_r;

  always_comb begin
    state_nx = state;
    unique case (state)
      IDLE: if (en)               state_nx = BUSY;
      BUSY: if (done)             state_nx = OUT;
      OUT:  if (ack_in)           state_nx = RTZ;
      RTZ:  if (!ack_in && !done) state_nx = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      ack_r <= 1'b0;
    end else begin
      state <= state_nx;
      if (en)           ack_r <= 1'b1;
      else if (!req_in) ack_r <= 1'b0;
    end
  end

  // Four-phase rules: a request is held until it is acknowledged, and so is req_out.
  a_req_in_held : assert property (@(posedge clk) disable iff (!rst_n)
    req_in && !ack_out |=> req_in)
    else $error("req_in fell before ack_out");
  a_req_out_held : assert property (@(posedge clk) disable iff (!rst_n)
    req_out && !ack_in |=> req_out)
    else $error("req_out fell before ack_in");

endmodule
