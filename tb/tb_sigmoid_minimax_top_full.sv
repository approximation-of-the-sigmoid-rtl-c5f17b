// tb_sigmoid_minimax_top_full: the sigmoid / derivative pair with every
// parameter at its default (11 accurate bits), taken through all 2^15
// input codes. Both outputs are checked word for word against the reference
// model and against the exact functions; the derivative must be even and
// the sigmoid odd about 1/2 over the whole range. Every interval of both
// units and the sign folding must be used. (The range clamp cannot act at
// 11 bits; the multi-accuracy test covers it.)
module tb_sigmoid_minimax_top_full;
  import tb_sigmoid_ref_pkg::*;

  localparam int ACC = 11;
  localparam int XW = ACC + 4;
  localparam int YW = ACC + 3;
  localparam int NCODES = 1 << XW;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [XW-1:0] x;
  logic [YW-1:0] sig_y, dsig_y;

  sigmoid_minimax_top dut (.x(x), .sig_y(sig_y), .dsig_y(dsig_y));

  logic [YW-1:0] sig_mem  [NCODES];
  logic [YW-1:0] dsig_mem [NCODES];
  int hits_s [NROWS];
  int hits_d [NROWS];
  int checks = 0, failures = 0;
  real max_s = 0.0, max_d = 0.0;

  task automatic check_one(bit deriv, longint code, logic [YW-1:0] y);
    longint e;
    real err;
    e = ref_y(deriv, ACC, code);
    checks++;
    if (longint'(y) != e) begin
      failures++;
      if (failures < 10) $display("FAIL fn=%0d x=%h y=%h expected %h", deriv, code, y, e);
    end
    err = y_value(ACC, longint'(y)) - true_f(deriv, x_value(ACC, code));
    if (err < 0.0) err = -err;
    if (deriv && err > max_d) max_d = err;
    if (!deriv && err > max_s) max_s = err;
    checks++;
    if (err > err_bound(deriv, ACC)) begin
      failures++;
      if (failures < 10) $display("FAIL fn=%0d x=%h error %f", deriv, code, err);
    end
  endtask

  initial begin
    int rs, rd, neg, s_hit, d_hit;
    neg = 0;
    foreach (hits_s[i]) hits_s[i] = 0;
    foreach (hits_d[i]) hits_d[i] = 0;
    for (int code = 0; code < NCODES; code++) begin
      @(posedge clk);
      x = XW'(code);
      @(negedge clk);
      sig_mem[code]  = sig_y;
      dsig_mem[code] = dsig_y;
      check_one(1'b0, longint'(code), sig_y);
      check_one(1'b1, longint'(code), dsig_y);
      if (is_neg(ACC, longint'(code))) neg++;
      rs = find_row(1'b0, ACC, real'(fold(ACC, longint'(code))) / (2.0 ** ACC));
      rd = find_row(1'b1, ACC, real'(fold(ACC, longint'(code))) / (2.0 ** ACC));
      if (rs >= 0) hits_s[rs]++;
      if (rd >= 0) hits_d[rd]++;
    end
    for (int code = 0; code < NCODES / 2; code++) begin
      int other;
      other = (~code) & (NCODES - 1);
      checks += 2;
      if (dsig_mem[code] != dsig_mem[other]) begin
        failures++;
        $display("FAIL derivative not even at x=%h", code);
      end
      if (YW'(sig_mem[code] + sig_mem[other]) != '1) begin
        failures++;
        $display("FAIL sigmoid not odd about 1/2 at x=%h", code);
      end
    end
    s_hit = 0;
    d_hit = 0;
    foreach (hits_s[i]) if (hits_s[i] > 0) s_hit++;
    foreach (hits_d[i]) if (hits_d[i] > 0) d_hit++;
    checks += 3;
    if (s_hit != num_rows(1'b0, ACC)) begin
      failures++;
      $display("FAIL %0d sigmoid intervals used", s_hit);
    end
    if (d_hit != num_rows(1'b1, ACC)) begin
      failures++;
      $display("FAIL %0d derivative intervals used", d_hit);
    end
    if (neg == 0) begin
      failures++;
      $display("FAIL no negative input");
    end
    $display("max |error|: sigmoid %f, derivative %f (2^-11 = %f); intervals %0d + %0d; negative inputs %0d",
             max_s, max_d, 2.0 ** (-ACC), s_hit, d_hit, neg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
