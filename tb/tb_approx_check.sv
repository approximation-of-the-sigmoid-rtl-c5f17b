// tb_approx_check: drives one minimax_approx configuration (function FN,
// ACC accurate bits) with every input code, one per clock cycle, and checks
// each output word against the reference model of tb_sigmoid_ref_pkg. It also
// checks the output against the exact function within ERR_BOUND and counts
// the negative inputs and the inputs that fell in each interval, so that
// the caller can confirm every interval and the sign folding were used.
// The design is combinational: the output is sampled half a cycle after the
// input changes, i.e. within the same cycle (zero cycles of latency).
module tb_approx_check
  import sigmoid_minimax_pkg::*;
  import tb_sigmoid_ref_pkg::*;
#(
  parameter func_e FN  = FN_SIGMOID,
  parameter int    ACC = 11
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   neg_seen,
  output int   intervals_hit,
  output int   intervals_total,
  output real  max_err
);

  localparam int XW = ACC + 4;
  localparam int YW = ACC + 3;
  localparam bit DERIV = (FN == FN_DERIVATIVE);
  // Published minimax error plus the rounding and folding terms listed at
  // err_bound() in tb_sigmoid_ref_pkg.
  localparam real ERR_BOUND = err_bound(DERIV, ACC);

  logic [XW-1:0] x;
  logic [YW-1:0] y;

  minimax_approx #(.FN(FN), .ACC(ACC)) dut (.x(x), .y(y));

  int hits [NROWS];

  initial begin
    longint exp_y;
    real    e;
    int     row;
    done = 1'b0;
    checks = 0;
    failures = 0;
    neg_seen = 0;
    max_err = 0.0;
    x = '0;
    foreach (hits[i]) hits[i] = 0;
    for (longint code = 0; code < (64'sd1 <<< XW); code++) begin
      @(posedge clk);
      x = XW'(code);
      @(negedge clk);
      exp_y = ref_y(DERIV, ACC, code);
      row = find_row(DERIV, ACC, real'(fold(ACC, code)) / (2.0 ** ACC));
      if (row >= 0) hits[row]++;
      if (is_neg(ACC, code)) neg_seen++;
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10)
          $display("FAIL fn=%0d acc=%0d x=%h y=%h expected %h", DERIV, ACC, x, y, exp_y);
      end
      e = y_value(ACC, longint'(y)) - true_f(DERIV, x_value(ACC, code));
      if (e < 0.0) e = -e;
      if (e > max_err) max_err = e;
    end
    checks++;
    if (max_err > ERR_BOUND) begin
      failures++;
      $display("FAIL fn=%0d acc=%0d max error %f above bound %f", DERIV, ACC, max_err, ERR_BOUND);
    end
    intervals_total = num_rows(DERIV, ACC);
    intervals_hit = 0;
    foreach (hits[i]) if (hits[i] > 0) intervals_hit++;
    $display("fn=%0d acc=%0d: %0d inputs, max |error| = %f (bound %f, 2^-%0d = %f), %0d/%0d intervals used, %0d negative inputs",
             DERIV, ACC, checks - 1, max_err, ERR_BOUND, ACC, 2.0 ** (-ACC), intervals_hit, intervals_total, neg_seen);
    done = 1'b1;
  end

endmodule
