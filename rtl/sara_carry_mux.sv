// sara_carry_mux: carry select at one sub-adder boundary.
//
// Chooses the carry that enters the next sub-adder: the accurate carry out
// of the lower sub-adder (c_acc) when config_i is 1, or the predicted carry
// (c_prdt) when config_i is 0. Choosing the prediction cuts the carry chain
// at this boundary, which shortens the critical path at the cost of an
// occasional missed carry.
//
// The mux and its configuration input follow the published block diagram;
// the polarity (1 = accurate) is this design's own choice, matched to the
// predictor being enabled by the complemented configuration bit.
//
// Interface: c_acc, c_prdt, config_i in; c_out out. Combinational.
module sara_carry_mux (
  input  logic c_acc,
  input  logic c_prdt,
  input  logic config_i,
  output logic c_out
);

  always_comb begin
    if (config_i) c_out = c_acc;
    else          c_out = c_prdt;
  end

endmodule
