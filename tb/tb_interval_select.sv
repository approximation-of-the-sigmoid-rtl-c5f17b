// tb_interval_select: for all ten configurations (sigmoid and derivative,
// 7 to 11 accurate bits) sweeps the five decoded bits x2..x-2 over all 32
// values and checks that exactly the select line of the interval holding
// that value is raised. The expected interval comes from the reference
// tables by comparing with the interval ends.
module tb_interval_select;
  import sigmoid_minimax_pkg::*;
  import tb_sigmoid_ref_pkg::*;

  localparam int NCFG = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [4:0]  xq;
  logic [18:0] sel_all [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam func_e FN  = (c < 5) ? FN_SIGMOID : FN_DERIVATIVE;
    localparam int    ACC = 7 + (c % 5);
    localparam int    NI  = num_intervals(FN, ACC);
    logic [NI-1:0] sel;
    interval_select #(.FN(FN), .ACC(ACC)) dut (.xq(xq), .sel(sel));
    assign sel_all[c] = 19'(sel);
  end

  int checks = 0, failures = 0;

  initial begin
    for (int q = 0; q < 32; q++) begin
      @(posedge clk);
      xq = 5'(q);
      @(negedge clk);
      for (int c = 0; c < NCFG; c++) begin
        bit d;
        int k, row;
        logic [18:0] exp_sel;
        d = (c >= 5);
        k = 7 + (c % 5);
        row = find_row(d, k, real'(q) / 4.0);
        exp_sel = 19'(1) << (row - first_row(d, k));
        checks++;
        if (sel_all[c] !== exp_sel) begin
          failures++;
          $display("FAIL fn=%0d acc=%0d xq=%b sel=%b expected %b", d, k, xq, sel_all[c], exp_sel);
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
