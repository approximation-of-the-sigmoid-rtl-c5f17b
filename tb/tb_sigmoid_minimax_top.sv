// tb_sigmoid_minimax_top: end-to-end test of the sigmoid / derivative pair
// in all five published accuracies (ACC = 7 to 11), every input code of
// each. Besides the per-output checks of tb_top_check it requires that each
// mechanism of the design acted at least once: sign folding of negative
// inputs, every interval of every unit, and the range clamp (which the
// 7- and 8-bit configurations need near |x| = 8).
module tb_sigmoid_minimax_top;

  localparam int NCFG = 5;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic done [NCFG];
  int   checks [NCFG], failures [NCFG], neg_seen [NCFG], clamp_seen [NCFG];
  int   s_hit [NCFG], s_tot [NCFG], d_hit [NCFG], d_tot [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_acc
    tb_top_check #(.ACC(7 + c)) u_chk (
      .clk(clk), .done(done[c]), .checks(checks[c]), .failures(failures[c]),
      .neg_seen(neg_seen[c]), .clamp_seen(clamp_seen[c]),
      .sig_int_hit(s_hit[c]), .sig_int_total(s_tot[c]),
      .dsig_int_hit(d_hit[c]), .dsig_int_total(d_tot[c])
    );
  end

  int n_checks = 0, n_failures = 0;

  initial begin
    bit all_done;
    int n_neg, n_clamp;
    do begin
      @(posedge clk);
      all_done = 1'b1;
      for (int c = 0; c < NCFG; c++) all_done &= done[c];
    end while (!all_done);
    n_neg = 0;
    n_clamp = 0;
    for (int c = 0; c < NCFG; c++) begin
      n_checks += checks[c] + 2;
      n_failures += failures[c];
      n_neg += neg_seen[c];
      n_clamp += clamp_seen[c];
      if (s_hit[c] != s_tot[c] || s_tot[c] == 0) begin
        n_failures++;
        $display("FAIL acc=%0d: %0d of %0d sigmoid intervals used", 7 + c, s_hit[c], s_tot[c]);
      end
      if (d_hit[c] != d_tot[c] || d_tot[c] == 0) begin
        n_failures++;
        $display("FAIL acc=%0d: %0d of %0d derivative intervals used", 7 + c, d_hit[c], d_tot[c]);
      end
    end
    n_checks += 2;
    $display("mechanisms: sign folding %0d, range clamp %0d", n_neg, n_clamp);
    if (n_neg == 0) begin
      n_failures++;
      $display("FAIL sign folding never happened");
    end
    if (n_clamp == 0) begin
      n_failures++;
      $display("FAIL range clamp never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", n_checks, n_failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", n_checks, n_failures + 1);
    $finish;
  end

endmodule
