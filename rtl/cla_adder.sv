// cla_adder: the carry lookahead adder that adds the final two rows of the
// multiply-accumulate unit.
//
// Two-level lookahead: bits are grouped by four; inside a group every carry
// is a sum of products of the bit generate (a&b) and propagate (a^b)
// signals, and each group forms a group generate and propagate. The carry
// into every group is in turn a sum of products of the group signals and the
// carry in, so no carry ripples. The published design names a carry
// lookahead adder without giving its structure; the group size of four and
// the two-level arrangement are this design's choice.
//
// Interface: a, b (W bits), cin; sum (W bits), cout.
// Timing: combinational.
module cla_adder #(
  parameter int W = 29
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int GS = 4;
  localparam int NG = (W + GS - 1) / GS;
  localparam int WP = NG * GS;

  logic [WP-1:0] g, p;
  logic [NG-1:0] gg, gp;     // group generate / propagate
  logic [NG:0]   gc;         // carry into each group, gc[NG] = carry out
  logic [WP-1:0] c;          // carry into each bit

  assign g = WP'(a) & WP'(b);
  assign p = WP'(a) ^ WP'(b);

  // Group generate and propagate.
  always_comb begin
    for (int k = 0; k < NG; k++) begin
      logic t;
      gp[k] = &p[k*GS +: GS];
      gg[k] = 1'b0;
      for (int m = 0; m < GS; m++) begin
        t = g[k*GS + m];
        for (int n = m + 1; n < GS; n++) t &= p[k*GS + n];
        gg[k] |= t;
      end
    end
  end

  // Second level: carry into each group from the group signals.
  always_comb begin
    for (int k = 0; k <= NG; k++) begin
      logic t;
      t = cin;
      for (int n = 0; n < k; n++) t &= gp[n];
      gc[k] = t;
      for (int m = 0; m < k; m++) begin
        t = gg[m];
        for (int n = m + 1; n < k; n++) t &= gp[n];
        gc[k] |= t;
      end
    end
  end

  // First level: carry into each bit from its group carry.
  always_comb begin
    for (int k = 0; k < NG; k++) begin
      for (int j = 0; j < GS; j++) begin
        logic t;
        t = gc[k];
        for (int n = 0; n < j; n++) t &= p[k*GS + n];
        c[k*GS + j] = t;
        for (int m = 0; m < j; m++) begin
          t = g[k*GS + m];
          for (int n = m + 1; n < j; n++) t &= p[k*GS + n];
          c[k*GS + j] |= t;
        end
      end
    end
  end

  assign sum = p[W-1:0] ^ c[W-1:0];

  // Carry out of bit W-1, also when W is not a multiple of the group size.
  if (W == WP) begin : g_cout_full
    assign cout = gc[NG];
  end else begin : g_cout_part
    assign cout = g[W-1] | (p[W-1] & c[W-1]);
  end

endmodule
