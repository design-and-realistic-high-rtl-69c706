// sara_carry_predict: carry predictor at one sub-adder boundary.
//
// Predicts the carry out of the lower sub-adder without waiting for that
// sub-adder's own carry to ripple through. The prediction is the generate
// term of the lower sub-adder's top bit, a_msb AND b_msb: when it is 1 the
// real carry out is certainly 1, so the prediction only ever errs by
// missing a carry that rippled in from below. The predictor is enabled by
// the complement of the boundary's configuration bit (config_n = 1 in
// approximate operation) and drives 0 otherwise, so it stays quiet while
// the adder runs accurately.
//
// That a predictor sits on each boundary and is gated by the complemented
// configuration bit follows the published block diagram; the prediction
// formula itself is this design's own choice, the simplest one that never
// predicts a carry that cannot occur.
//
// Interface: a_msb, b_msb, config_n in; c_prdt out. Combinational.
module sara_carry_predict (
  input  logic a_msb,
  input  logic b_msb,
  input  logic config_n,
  output logic c_prdt
);

  assign c_prdt = config_n & a_msb & b_msb;

endmodule
