// sign_xor: the conditional inverter of the approximator, a row of XOR
// gates that one's-complements a word when the control bit is set.
//
// The approximator uses it twice. On the input it XORs the integer and
// fraction bits of a two's complement argument with the argument's sign bit,
// which folds a negative x onto its magnitude (exactly -x - 1 LSB, the one's
// complement). On the output of the sigmoid it XORs the fraction bits of
// sig(|x|) with the same sign bit, giving 1 - sig(|x|) - 1 LSB = sig(x) for
// a negative x. Both uses are as the published design has them; the module
// width is a parameter.
//
// Interface: inv (control), a (W bits in), y = a ^ {W{inv}}.
// Timing: purely combinational, one XOR gate deep.
module sign_xor #(
  parameter int W = 14
) (
  input  logic         inv,
  input  logic [W-1:0] a,
  output logic [W-1:0] y
);

  assign y = a ^ {W{inv}};

endmodule
