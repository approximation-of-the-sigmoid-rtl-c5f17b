// tb_top_check: end-to-end check of one sigmoid_minimax_top built for ACC
// accurate bits. Every input code is applied, one per clock cycle; both
// outputs are compared word for word with the reference model and their
// error against the exact sigmoid and derivative is bounded (see
// err_bound() in tb_sigmoid_ref_pkg). After the sweep it checks that the
// derivative output is even, dsig_y(x) == dsig_y(~x) for every code, and
// that the sigmoid output is odd about 1/2, sig_y(x) + sig_y(~x) == 1 - LSB.
// It counts how often each mechanism of the design acted: sign folding of
// a negative input, each interval of each unit, and the range clamp.
// Output is sampled in the same cycle as the input (zero latency).
module tb_top_check
  import tb_sigmoid_ref_pkg::*;
#(
  parameter int ACC = 11
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   neg_seen,
  output int   clamp_seen,
  output int   sig_int_hit,
  output int   sig_int_total,
  output int   dsig_int_hit,
  output int   dsig_int_total
);

  localparam int XW = ACC + 4;
  localparam int YW = ACC + 3;
  localparam int NCODES = 1 << XW;

  logic [XW-1:0] x;
  logic [YW-1:0] sig_y, dsig_y;

  sigmoid_minimax_top #(.ACC(ACC)) dut (.x(x), .sig_y(sig_y), .dsig_y(dsig_y));

  logic [YW-1:0] sig_mem  [NCODES];
  logic [YW-1:0] dsig_mem [NCODES];
  int hits_s [NROWS];
  int hits_d [NROWS];

  task automatic check_one(bit deriv, longint code, logic [YW-1:0] y);
    longint e;
    real err;
    e = ref_y(deriv, ACC, code);
    checks++;
    if (longint'(y) != e) begin
      failures++;
      if (failures < 10)
        $display("FAIL acc=%0d fn=%0d x=%h y=%h expected %h", ACC, deriv, code, y, e);
    end
    err = y_value(ACC, longint'(y)) - true_f(deriv, x_value(ACC, code));
    if (err < 0.0) err = -err;
    checks++;
    if (err > err_bound(deriv, ACC)) begin
      failures++;
      if (failures < 10)
        $display("FAIL acc=%0d fn=%0d x=%h error %f above %f", ACC, deriv, code, err,
                 err_bound(deriv, ACC));
    end
  endtask

  initial begin
    int rs, rd;
    done = 1'b0;
    checks = 0;
    failures = 0;
    neg_seen = 0;
    clamp_seen = 0;
    x = '0;
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
      if (is_neg(ACC, longint'(code))) neg_seen++;
      if (ref_clamped(1'b0, ACC, longint'(code))) clamp_seen++;
      if (ref_clamped(1'b1, ACC, longint'(code))) clamp_seen++;
      rs = find_row(1'b0, ACC, real'(fold(ACC, longint'(code))) / (2.0 ** ACC));
      rd = find_row(1'b1, ACC, real'(fold(ACC, longint'(code))) / (2.0 ** ACC));
      if (rs >= 0) hits_s[rs]++;
      if (rd >= 0) hits_d[rd]++;
    end
    // Symmetry: code and its one's complement fold to the same magnitude.
    for (int code = 0; code < NCODES / 2; code++) begin
      int other;
      other = (~code) & (NCODES - 1);
      checks += 2;
      if (dsig_mem[code] != dsig_mem[other]) begin
        failures++;
        $display("FAIL acc=%0d derivative not even at x=%h", ACC, code);
      end
      if (YW'(sig_mem[code] + sig_mem[other]) != '1) begin
        failures++;
        $display("FAIL acc=%0d sigmoid not odd about 1/2 at x=%h", ACC, code);
      end
    end
    sig_int_total  = num_rows(1'b0, ACC);
    dsig_int_total = num_rows(1'b1, ACC);
    sig_int_hit = 0;
    dsig_int_hit = 0;
    foreach (hits_s[i]) if (hits_s[i] > 0) sig_int_hit++;
    foreach (hits_d[i]) if (hits_d[i] > 0) dsig_int_hit++;
    $display("acc=%0d: %0d codes, negative %0d, clamped %0d, sigmoid intervals %0d/%0d, derivative intervals %0d/%0d",
             ACC, NCODES, neg_seen, clamp_seen, sig_int_hit, sig_int_total, dsig_int_hit, dsig_int_total);
    done = 1'b1;
  end

endmodule
