// sigmoid_minimax_top: sigmoid and sigmoid-derivative approximators side by
// side on one input, the pair of units a neural-network datapath needs (the
// sigmoid for the neuron output, its derivative for training).
//
// Both units are minimax_approx instances, one per function, each with its
// own published interval set for ACC accurate bits; they share only the
// input. ACC may be 7 to 11, the five accuracies the published design is
// given for; the default, 11, is the most accurate of them (choosing it as
// the default is this design's choice).
//
// Interface: x, two's complement with 3 integer and ACC fraction bits;
// sig_y ~ sig(x) and dsig_y ~ sig'(x), each an unsigned fraction of ACC+3
// bits.
// Timing: combinational, no clock and no state.
module sigmoid_minimax_top
  import sigmoid_minimax_pkg::*;
#(
  parameter int  ACC = 11,
  localparam int XW  = x_width(ACC),
  localparam int YW  = y_width(ACC)
) (
  input  logic [XW-1:0] x,
  output logic [YW-1:0] sig_y,
  output logic [YW-1:0] dsig_y
);

  initial begin
    assert (ACC >= MIN_ACC && ACC <= MAX_ACC)
      else $error("sigmoid_minimax_top: ACC=%0d outside %0d..%0d", ACC, MIN_ACC, MAX_ACC);
  end

  minimax_approx #(.FN(FN_SIGMOID), .ACC(ACC)) u_sig (
    .x(x),
    .y(sig_y)
  );

  minimax_approx #(.FN(FN_DERIVATIVE), .ACC(ACC)) u_dsig (
    .x(x),
    .y(dsig_y)
  );

endmodule
