// mac_unit: the multiply-accumulate unit of the approximator, computing
// r = c0 * 2^C0_SHIFT + c1 * x + RND in one combinational pass.
//
// It is a tree multiplier with one extra row: the partial product matrix
// holds one row per bit of x (c1, sign-extended when C1_SIGNED and shifted,
// gated by that bit) and, below them, a row carrying c0 aligned to the
// product's binary point. The matrix is reduced to two rows by levels of 3:2
// carry-save compressors (csa_row), three rows becoming two at each level,
// and the two rows are added by a carry lookahead adder (cla_adder). This
// follows the published structure (tree multiplier, added c0 row, reduction
// to two values, carry lookahead adder). The published reduction is a
// reduced-area scheme whose details are not given, so the row-wise
// Wallace-style reduction used here is this design's own choice.
//
// The optional constant RND (a single 1 at bit RND_BIT, none when RND_BIT
// is negative) is ORed into the c0 row below c0's least significant bit, so
// it costs no adder: the approximator uses it to round its output to
// nearest instead of truncating (this design's choice).
//
// Number formats: x is unsigned (X_W bits); c0 unsigned (C_W bits); c1
// two's complement when C1_SIGNED, else unsigned (C_W bits). r is two's
// complement with R_W = X_W + C_W + 2 bits, wide enough that no sum of the
// inputs overflows. Sign extension is done on whole rows and all arithmetic
// is modulo 2^R_W, which is exact for a result that fits.
//
// Timing: combinational.
module mac_unit #(
  parameter int  X_W       = 14,
  parameter int  C_W       = 14,
  parameter bit  C1_SIGNED = 1'b1,
  parameter int  C0_SHIFT  = 13,
  parameter int  RND_BIT   = -1,
  localparam int R_W       = X_W + C_W + 2
) (
  input  logic [X_W-1:0]        x,
  input  logic [C_W-1:0]        c0,
  input  logic [C_W-1:0]        c1,
  output logic signed [R_W-1:0] r
);

  localparam int NROWS = X_W + 1;

  // Rows left after each level of 3:2 reduction.
  function automatic int rows_after(int levels);
    int n;
    n = NROWS;
    for (int l = 0; l < levels; l++) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

  function automatic int num_levels();
    int n;
    int l;
    n = NROWS;
    l = 0;
    while (n > 2) begin
      n = 2 * (n / 3) + (n % 3);
      l++;
    end
    return l;
  endfunction

  localparam int NLEV = num_levels();

  // Level 0: the partial product matrix plus the c0 row.
  logic [R_W-1:0] pp [NROWS];

  localparam logic [R_W-1:0] RND = (RND_BIT >= 0) ? (R_W'(1) << RND_BIT) : '0;

  logic [R_W-1:0] c1_ext;

  if (C1_SIGNED) begin : g_sext
    assign c1_ext = R_W'(signed'(c1));
  end else begin : g_zext
    assign c1_ext = R_W'(c1);
  end

  for (genvar j = 0; j < X_W; j++) begin : g_pp
    assign pp[j] = x[j] ? (c1_ext << j) : '0;
  end
  assign pp[X_W] = (R_W'(c0) << C0_SHIFT) | RND;

  // Reduction levels; level l turns rows_after(l) rows into rows_after(l+1).
  for (genvar l = 0; l < NLEV; l++) begin : g_lev
    localparam int RIN  = rows_after(l);
    localparam int RG   = RIN / 3;
    localparam int ROUT = rows_after(l + 1);
    logic [R_W-1:0] rin  [RIN];
    logic [R_W-1:0] rout [ROUT];
    if (l == 0) begin : g_first
      assign rin = pp;
    end else begin : g_next
      assign rin = g_lev[l-1].rout;
    end
    for (genvar g = 0; g < RG; g++) begin : g_csa
      csa_row #(.W(R_W)) u_csa (
        .a (rin[3*g]),
        .b (rin[3*g+1]),
        .c (rin[3*g+2]),
        .s (rout[2*g]),
        .co(rout[2*g+1])
      );
    end
    for (genvar t = 0; t < RIN % 3; t++) begin : g_pass
      assign rout[2*RG+t] = rin[3*RG+t];
    end
  end

  logic [R_W-1:0] sum;
  logic           cout_unused;

  cla_adder #(.W(R_W)) u_cla (
    .a   (g_lev[NLEV-1].rout[0]),
    .b   (g_lev[NLEV-1].rout[1]),
    .cin (1'b0),
    .sum (sum),
    .cout(cout_unused)
  );

  assign r = signed'(sum);

endmodule
