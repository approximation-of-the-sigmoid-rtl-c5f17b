// interval_select: the multiplexor signal logic of the approximator. It
// decides which approximation interval of [0,8) the folded input lies in and
// raises exactly one select line for that interval.
//
// Every interval of a configuration is an aligned, power-of-two-wide block
// of quarters, so it is recognised by a fixed pattern on the leading bits of
// x2 x1 x0 x-1 x-2 (its "differentiating bits"): [0,1) by x2'x1'x0',
// [4,8) by x2, [13/4,7/2) by x2'x1x0x-1'x-2, and so on. Each select line is
// one AND term of those literals; no encoder is needed because the
// coefficient multiplexors downstream are one-hot. The interval sets are the
// published ones for the chosen function and accuracy (see
// sigmoid_minimax_pkg); the patterns are derived from the interval end
// points at elaboration rather than typed in.
//
// Interface: xq = {x2,x1,x0,x-1,x-2} of the folded input; sel one-hot,
// bit i for the i-th interval counted upward from 0.
// Timing: combinational, one AND level of at most five literals.
module interval_select
  import sigmoid_minimax_pkg::*;
#(
  parameter func_e FN  = FN_SIGMOID,
  parameter int    ACC = 11,
  localparam int   NI  = num_intervals(FN, ACC)
) (
  input  logic [SEL_BITS-1:0] xq,
  output logic [NI-1:0]       sel
);

  for (genvar i = 0; i < NI; i++) begin : g_term
    // Bits of xq below FREE are "don't care" for this interval.
    localparam int FREE = interval_free_bits(FN, ACC, i);
    localparam logic [SEL_BITS-1:0] LO = SEL_BITS'(interval_lo(FN, ACC, i));
    assign sel[i] = (xq[SEL_BITS-1:FREE] == LO[SEL_BITS-1:FREE]);
  end

  // The intervals tile [0,8): every input matches exactly one pattern.
  always_comb begin
    assert ((sel != '0) && ((sel & (sel - 1'b1)) == '0))
      else $error("interval_select: select %b is not one-hot for xq=%b", sel, xq);
  end

endmodule
