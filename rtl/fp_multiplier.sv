// IEEE-754 single-precision multiplier built on self-timed carry-lookahead adders.
//
// Two pipeline stages, each a stage latch, a processing unit and a control unit, pass
// operands on with a four-phase request/acknowledge handshake:
//   stage 1  latches a and b, adds the exponents and removes one bias (exp_calc), multiplies
//            the 24-bit significands in an array of dual-rail CLAs (mant_mult), and forms the
//            sign and the special-operand flags;
//   stage 2  latches those results and normalises, rounds to nearest even and packs them
//            (fp_round).
// Each processing unit reports done when its dual-rail adders have all completed; the control
// unit then requests the next stage. Interface: hold a and b with start high until ack rises,
// then lower start; c is valid while done is high, and done stays high until done_ack rises.
// With an immediately acknowledging consumer, done rises four clock cycles after the edge that
// loads the operands, and a new pair can be loaded while the previous one is in stage 2.
// The split into exponent calculator and CLA-based significand multiplier, the port names
// start, a, b, c and the request/acknowledge pipeline follow the document; the number of
// stages, the clocked control and the exception handling are this design's own.
module fp_multiplier
  import stcla_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        ack,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] c,
  output logic        done,
  input  logic        done_ack
);

  // Results of stage 1 handed to stage 2
  typedef struct packed {
    logic        sign;
    logic [9:0]  e_unb;
    logic [47:0] p;
    logic        zero;
    logic        inf;
    logic        nan;
  } prod_t;

  // ---------------- stage 1: exponent add and significand multiply
  logic [63:0] ops_q;
  logic [31:0] a_q, b_q;
  logic        en1, start1, done1, req1, ack2;
  logic        done_exp, done_sig;
  logic [8:0]  e_sum;
  prod_t       prod_d, prod_q;

  ctrl_unit u_ctrl1 (
    .clk(clk), .rst_n(rst_n), .req_in(start), .ack_out(ack), .en(en1), .start(start1),
    .done(done1), .req_out(req1), .ack_in(ack2)
  );

  stage_latch #(.W(64)) u_lat1 (.clk(clk), .rst_n(rst_n), .en(en1), .d({a, b}), .q(ops_q));
  assign {a_q, b_q} = ops_q;

  exp_calc u_exp (
    .start(start1), .a(a_q), .b(b_q), .e(e_sum), .e_unb(prod_d.e_unb), .done(done_exp)
  );

  mant_mult #(.N(FP_SIG_W)) u_sig (
    .start(start1), .x({1'b1, a_q[22:0]}), .y({1'b1, b_q[22:0]}), .p(prod_d.p), .done(done_sig)
  );

  assign done1 = done_exp & done_sig;

  always_comb begin
    logic a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
    a_zero = (a_q[30:23] == 8'h00);
    b_zero = (b_q[30:23] == 8'h00);
    a_inf  = (a_q[30:23] == 8'hff) && (a_q[22:0] == '0);
    b_inf  = (b_q[30:23] == 8'hff) && (b_q[22:0] == '0);
    a_nan  = (a_q[30:23] == 8'hff) && (a_q[22:0] != '0);
    b_nan  = (b_q[30:23] == 8'hff) && (b_q[22:0] != '0);
    prod_d.sign = a_q[31] ^ b_q[31];
    prod_d.nan  = a_nan | b_nan | (a_inf & b_zero) | (b_inf & a_zero);
    prod_d.inf  = a_inf | b_inf;
    prod_d.zero = a_zero | b_zero;
  end

  // e_sum (Ea + Eb) is only an intermediate of the exponent calculator here.
  logic [8:0] unused_e_sum;
  assign unused_e_sum = e_sum;

  // ---------------- stage 2: normalise, round, pack
  logic en2, start2, done2;

  ctrl_unit u_ctrl2 (
    .clk(clk), .rst_n(rst_n), .req_in(req1), .ack_out(ack2), .en(en2), .start(start2),
    .done(done2), .req_out(done), .ack_in(done_ack)
  );

  stage_latch #(.W($bits(prod_t))) u_lat2 (
    .clk(clk), .rst_n(rst_n), .en(en2), .d(prod_d), .q(prod_q)
  );

  fp_round u_rnd (
    .start(start2), .sign(prod_q.sign), .e_unb(prod_q.e_unb), .p(prod_q.p),
    .zero_in(prod_q.zero), .inf_in(prod_q.inf), .nan_in(prod_q.nan), .z(c), .done(done2)
  );

endmodule
