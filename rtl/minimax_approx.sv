// minimax_approx: a complete partitioned first-order minimax approximator
// of the sigmoid sig(x) = 1/(1+exp(-x)) (FN = FN_SIGMOID) or of its
// derivative sig'(x) (FN = FN_DERIVATIVE) over (-8,8), with ACC accurate
// fraction bits (7 to 11).
//
// Dataflow, all combinational:
//   1. Input XOR gates: the integer and fraction bits of x are XORed with its
//      sign, folding a negative x onto [0,8) (one's complement, |x| - 1 LSB).
//   2. Multiplexor signal logic (interval_select) looks at x2..x-2 of the
//      folded value and raises one select line per interval.
//   3. One-hot multiplexors (coef_mux) pick the hard-wired c0, c1.
//   4. The multiply-accumulate unit (mac_unit) forms c0 + c1*|x|, rounded to
//      the K+3 output fraction bits.
//   5. Range clamp: a result below 0 becomes 0 and a result of 1 or more
//      becomes the largest fraction 1 - 2^-(K+3).
//   6. Sigmoid only: output XOR gates one's-complement the result for a
//      negative x, giving 1 - sig(|x|) - 1 LSB, i.e. sig(x) by
//      sig(-x) = 1 - sig(x).
// The derivative is even, sig'(-x) = sig'(x), so its result is passed on
// unchanged for either sign. (The published text states an odd symmetry for
// the derivative and routes it through the output XOR gates as well; that
// would return 1 - sig'(|x|), so this design follows the function's
// definition instead.)
//
// The clamp (step 5) is not in the published design. It is needed because
// the minimax line of the last interval overshoots the function's limits
// near |x| = 8 in the 7- and 8-bit configurations: the sigmoid line passes
// 1 (0.968019 + 0.004412 * 8 = 1.0033) and the derivative line passes 0.
// Without it the reflected sigmoid and the derivative would wrap around.
//
// Formats (K = ACC): x is two's complement with 3 integer and K fraction
// bits (K+4 bits, range [-8,8)); y is an unsigned fraction of K+3 bits,
// range [0,1). The multiplier operand widths (K+3 bits for |x| and for each
// coefficient) are the published ones; the output width, the rounding and
// the binary point of c1 are this design's choice.
//
// Timing: combinational, no clock; y is valid one propagation delay after x.
module minimax_approx
  import sigmoid_minimax_pkg::*;
#(
  parameter func_e FN  = FN_SIGMOID,
  parameter int    ACC = 11,
  localparam int   XW  = x_width(ACC),
  localparam int   YW  = y_width(ACC)
) (
  input  logic [XW-1:0] x,
  output logic [YW-1:0] y
);

  localparam int CW  = coef_width(ACC);
  localparam int MW  = ACC + 3;             // folded magnitude: 3 int + K frac
  localparam int NI  = num_intervals(FN, ACC);
  localparam int RF  = ACC + c1_frac(ACC);  // fraction bits of the MAC result
  localparam int RW  = MW + CW + 2;

  logic              neg;
  logic [MW-1:0]     mag;
  logic [NI-1:0]     sel;
  logic [CW-1:0]     c0, c1;
  logic [RW-1:0]     r;
  logic              r_neg, r_over;
  logic [YW-1:0]     y_pos;

  assign neg = x[XW-1];

  sign_xor #(.W(MW)) u_in_xor (
    .inv(neg),
    .a  (x[MW-1:0]),
    .y  (mag)
  );

  interval_select #(.FN(FN), .ACC(ACC)) u_sel (
    .xq (mag[MW-1 -: SEL_BITS]),
    .sel(sel)
  );

  coef_mux #(.FN(FN), .ACC(ACC)) u_coef (
    .sel(sel),
    .c0 (c0),
    .c1 (c1)
  );

  // c0 has K+3 fraction bits and c1*|x| has RF = 2K+5, so c0 moves up by
  // RF - (K+3). The rounding constant is half an output LSB.
  mac_unit #(
    .X_W      (MW),
    .C_W      (CW),
    .C1_SIGNED(FN == FN_DERIVATIVE),
    .C0_SHIFT (RF - c0_frac(ACC)),
    .RND_BIT  (RF - YW - 1)
  ) u_mac (
    .x (mag),
    .c0(c0),
    .c1(c1),
    .r (r)
  );

  // Range clamp to [0, 1 - 2^-YW].
  assign r_neg  = r[RW-1];
  assign r_over = |r[RW-2:RF];
  always_comb begin
    if (r_neg)       y_pos = '0;
    else if (r_over) y_pos = '1;
    else             y_pos = r[RF-1 -: YW];
  end

  if (FN == FN_SIGMOID) begin : g_reflect
    sign_xor #(.W(YW)) u_out_xor (
      .inv(neg),
      .a  (y_pos),
      .y  (y)
    );
  end else begin : g_even
    assign y = y_pos;
  end

endmodule
