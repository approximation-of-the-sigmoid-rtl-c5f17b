// tb_cla_adder: checks the carry lookahead adder at three widths (29 bits,
// the 11-bit approximator's, 13 bits, not a multiple of the group size, and
// 8 bits) against the simulator's own addition, with random operands and
// the carry-chain corner cases (all ones plus one, all ones plus all ones).
module tb_cla_adder;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [28:0] a29, b29, s29;
  logic [12:0] a13, b13, s13;
  logic [7:0]  a8,  b8,  s8;
  logic        cin, co29, co13, co8;

  cla_adder #(.W(29)) dut29 (.a(a29), .b(b29), .cin(cin), .sum(s29), .cout(co29));
  cla_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(cin), .sum(s13), .cout(co13));
  cla_adder #(.W(8))  dut8  (.a(a8),  .b(b8),  .cin(cin), .sum(s8),  .cout(co8));

  int checks = 0, failures = 0;

  task automatic check(int w, longint a, longint b, bit ci, longint s, bit co);
    longint e;
    e = a + b + longint'(ci);
    checks++;
    if (s != (e & ((64'sd1 << w) - 1)) || longint'(co) != ((e >> w) & 1)) begin
      failures++;
      $display("FAIL W=%0d %h + %h + %b = %b %h", w, a, b, ci, co, s);
    end
  endtask

  initial begin
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      cin = n[0];
      case (n)
        0: begin a29 = '1; b29 = '0; a13 = '1; b13 = '0; a8 = '1; b8 = '0; cin = 1'b1; end
        1: begin a29 = '1; b29 = '1; a13 = '1; b13 = '1; a8 = '1; b8 = '1; end
        2: begin a29 = '0; b29 = '0; a13 = '0; b13 = '0; a8 = '0; b8 = '0; end
        default: begin
          a29 = 29'($urandom); b29 = 29'($urandom);
          a13 = 13'($urandom); b13 = 13'($urandom);
          a8  = 8'($urandom);  b8  = 8'($urandom);
        end
      endcase
      @(negedge clk);
      check(29, longint'(a29), longint'(b29), cin, longint'(s29), co29);
      check(13, longint'(a13), longint'(b13), cin, longint'(s13), co13);
      check(8,  longint'(a8),  longint'(b8),  cin, longint'(s8),  co8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
