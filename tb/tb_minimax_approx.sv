// tb_minimax_approx: exhaustive test of all ten published configurations of
// the approximator (sigmoid and derivative, 7 to 11 accurate bits). Each
// configuration gets every input code; outputs are compared word for word
// with the reference model and their error against the exact function is
// bounded by 2^-ACC. Also required: every interval of every configuration
// used at least once, and negative inputs seen.
module tb_minimax_approx;
  import sigmoid_minimax_pkg::*;

  localparam int NCFG = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [NCFG];
  int   checks [NCFG], failures [NCFG], neg_seen [NCFG];
  int   hit [NCFG], total [NCFG];
  real  max_err [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam func_e FN  = (c < 5) ? FN_SIGMOID : FN_DERIVATIVE;
    localparam int    ACC = 7 + (c % 5);
    tb_approx_check #(.FN(FN), .ACC(ACC)) u_chk (
      .clk(clk), .done(done[c]), .checks(checks[c]), .failures(failures[c]),
      .neg_seen(neg_seen[c]), .intervals_hit(hit[c]), .intervals_total(total[c]),
      .max_err(max_err[c])
    );
  end

  int n_checks, n_failures;

  initial begin
    bit all_done;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int c = 0; c < NCFG; c++) all_done &= done[c];
    end while (!all_done);
    n_checks = 0;
    n_failures = 0;
    for (int c = 0; c < NCFG; c++) begin
      n_checks += checks[c] + 2;
      n_failures += failures[c];
      if (hit[c] != total[c] || total[c] == 0) begin
        n_failures++;
        $display("FAIL config %0d: %0d of %0d intervals used", c, hit[c], total[c]);
      end
      if (neg_seen[c] == 0) begin
        n_failures++;
        $display("FAIL config %0d: no negative input", c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", n_checks, n_failures);
    $finish;
  end

  // Watchdog: 2^15 input codes for the largest configuration.
  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", n_checks, n_failures + 1);
    $finish;
  end

endmodule
