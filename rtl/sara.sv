// sara: simple accuracy reconfigurable adder (SARA), top level.
//
// An N-bit adder split into N/SUB_W ripple-carry sub-adders. At every
// boundary between two sub-adders a mux picks the carry that enters the
// upper sub-adder: either the accurate carry out of the sub-adder below,
// or a carry predicted from the lower sub-adder's top operand bits alone.
// With sel = 1 every boundary passes the accurate carry and the adder is
// exact. With sel = 0 the boundaries marked in APPROX_MASK use the
// predicted carry instead, which cuts the carry chain there; the sum then
// has no error-correction step and may fall short of the exact sum when a
// carry that rippled up from below is missed. There is no stall and no
// recomputation: accuracy is traded for a shorter worst-case carry path.
//
// Interface (as in the published top level): a, b (N bits), cin, sel in;
// sout (N+1 bits, sout[N] is the carry out) out. Purely combinational:
// there is no clock, and the sum is valid one propagation delay after the
// inputs.
//
// Follows the published design: 32-bit width, 4-bit sub-adders, one
// predictor and one mux per boundary, a single accuracy input. This
// design's own choices: the sel polarity, the prediction formula (see
// sara_carry_predict) and APPROX_MASK, which by default lets sel switch
// every boundary; clearing a bit keeps that boundary accurate in both
// modes, so partly approximate configurations can be built.
module sara #(
  parameter int unsigned N     = sara_pkg::SARA_N,
  parameter int unsigned SUB_W = sara_pkg::SARA_SUB_W,
  // Bit k is boundary k, between sub-adder k-1 and sub-adder k.
  parameter logic [N/SUB_W-1:1] APPROX_MASK = '1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  input  logic         sel,
  output logic [N:0]   sout
);

  localparam int unsigned NSUB = N / SUB_W;

  if (NSUB < 2 || NSUB * SUB_W != N) begin : g_bad_size
    $error("sara: N must be a multiple of SUB_W with at least two sub-adders");
  end

  logic [NSUB-1:0] c_in;    // carry into each sub-adder
  logic [NSUB-1:0] c_acc;   // accurate carry out of each sub-adder

  assign c_in[0] = cin;

  for (genvar k = 0; k < NSUB; k++) begin : g_sub
    sara_subadder #(.W(SUB_W)) u_sub (
      .a  (a[k*SUB_W +: SUB_W]),
      .b  (b[k*SUB_W +: SUB_W]),
      .ci (c_in[k]),
      .s  (sout[k*SUB_W +: SUB_W]),
      .co (c_acc[k])
    );
  end

  for (genvar k = 1; k < NSUB; k++) begin : g_bnd
    logic cfg;      // Config: 1 passes the accurate carry
    logic c_prdt;

    assign cfg = sel | ~APPROX_MASK[k];

    sara_carry_predict u_prdt (
      .a_msb    (a[k*SUB_W - 1]),
      .b_msb    (b[k*SUB_W - 1]),
      .config_n (~cfg),
      .c_prdt   (c_prdt)
    );

    sara_carry_mux u_mux (
      .c_acc    (c_acc[k-1]),
      .c_prdt   (c_prdt),
      .config_i (cfg),
      .c_out    (c_in[k])
    );
  end

  assign sout[N] = c_acc[NSUB-1];

endmodule
