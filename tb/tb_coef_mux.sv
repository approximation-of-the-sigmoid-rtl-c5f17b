// tb_coef_mux: for all ten configurations raises each select line in turn
// and checks the c0 and c1 words against the reference tables, rounded
// here with real arithmetic (c0 to ACC+3 and c1 to ACC+5 fraction bits).
// Also checks that no select line gives zero coefficients.
module tb_coef_mux;
  import sigmoid_minimax_pkg::*;
  import tb_sigmoid_ref_pkg::*;

  localparam int NCFG = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [18:0] sel;
  logic [13:0] c0_all [NCFG];
  logic [13:0] c1_all [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam func_e FN  = (c < 5) ? FN_SIGMOID : FN_DERIVATIVE;
    localparam int    ACC = 7 + (c % 5);
    localparam int    NI  = num_intervals(FN, ACC);
    localparam int    CW  = coef_width(ACC);
    logic [CW-1:0] c0, c1;
    coef_mux #(.FN(FN), .ACC(ACC)) dut (.sel(sel[NI-1:0]), .c0(c0), .c1(c1));
    assign c0_all[c] = 14'(c0);
    assign c1_all[c] = 14'(c1);
  end

  int checks = 0, failures = 0;

  initial begin
    for (int i = -1; i < 19; i++) begin
      @(posedge clk);
      sel = (i < 0) ? '0 : (19'(1) << i);
      @(negedge clk);
      for (int c = 0; c < NCFG; c++) begin
        bit d;
        int k, row;
        longint mask, e0, e1;
        d = (c >= 5);
        k = 7 + (c % 5);
        if (i >= num_rows(d, k)) continue;
        mask = (64'sd1 <<< (k + 3)) - 1;
        if (i < 0) begin
          e0 = 0;
          e1 = 0;
        end else begin
          row = first_row(d, k) + i;
          e0 = round_coef(ROWS[row][4], k + 3) & mask;
          e1 = round_coef(ROWS[row][5], k + 5) & mask;
        end
        checks += 2;
        if (longint'(c0_all[c]) != e0) begin
          failures++;
          $display("FAIL fn=%0d acc=%0d interval %0d c0=%h expected %h", d, k, i, c0_all[c], e0);
        end
        if (longint'(c1_all[c]) != e1) begin
          failures++;
          $display("FAIL fn=%0d acc=%0d interval %0d c1=%h expected %h", d, k, i, c1_all[c], e1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
