// coef_mux: the two one-hot coefficient multiplexors of the approximator.
// The minimax coefficients c0 and c1 of every interval are constants wired
// to the multiplexor inputs (no ROM, no registers); the one-hot select from
// interval_select picks one pair.
//
// Each multiplexor is an AND-OR structure: every constant word is ANDed with
// its select line and the results are ORed. The constants are the published
// six-decimal coefficients, rounded to nearest at elaboration into the
// K+3-bit formats of sigmoid_minimax_pkg (c0 unsigned with LSB weight
// 2^-(K+3); c1 with LSB weight 2^-(K+5), unsigned for the sigmoid and two's
// complement for the derivative). The widths are the published ones;
// rounding to nearest and the binary point of c1 are this design's choice.
//
// Interface: sel (one-hot, one bit per interval); c0, c1 (K+3 bits each).
// Timing: combinational, an AND level and an OR tree of NI inputs.
module coef_mux
  import sigmoid_minimax_pkg::*;
#(
  parameter func_e FN  = FN_SIGMOID,
  parameter int    ACC = 11,
  localparam int   NI  = num_intervals(FN, ACC),
  localparam int   CW  = coef_width(ACC)
) (
  input  logic [NI-1:0]        sel,
  output logic [CW-1:0]        c0,
  output logic [CW-1:0]        c1
);

  logic [CW-1:0] c0_term [NI];
  logic [CW-1:0] c1_term [NI];

  for (genvar i = 0; i < NI; i++) begin : g_in
    localparam logic [CW-1:0] C0 = CW'(c0_word(FN, ACC, i));
    localparam logic [CW-1:0] C1 = CW'(c1_word(FN, ACC, i));
    assign c0_term[i] = C0 & {CW{sel[i]}};
    assign c1_term[i] = C1 & {CW{sel[i]}};
  end

  always_comb begin
    c0 = '0;
    c1 = '0;
    for (int i = 0; i < NI; i++) begin
      c0 |= c0_term[i];
      c1 |= c1_term[i];
    end
  end

endmodule
