// tb_mac_unit: checks the multiply-accumulate unit in the two shapes the
// approximator uses, r = c0 * 2^C0_SHIFT + c1 * x + rounding constant:
//   - 11-bit derivative shape: 14-bit x, 14-bit signed c1, c0 shifted 13,
//     rounding bit 12;
//   - 7-bit sigmoid shape: 10-bit x, 10-bit unsigned c1, c0 shifted 9,
//     rounding bit 8;
// and a shape without rounding constant. Random operands plus extremes, compared with
// 64-bit integer arithmetic.
module tb_mac_unit;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [13:0] xa, c0a, c1a;
  logic [29:0] ra;
  logic [9:0]  xb, c0b, c1b;
  logic [21:0] rb, rc;

  mac_unit #(.X_W(14), .C_W(14), .C1_SIGNED(1'b1), .C0_SHIFT(13), .RND_BIT(12)) dut_a (
    .x(xa), .c0(c0a), .c1(c1a), .r(ra));
  mac_unit #(.X_W(10), .C_W(10), .C1_SIGNED(1'b0), .C0_SHIFT(9), .RND_BIT(8)) dut_b (
    .x(xb), .c0(c0b), .c1(c1b), .r(rb));
  mac_unit #(.X_W(10), .C_W(10), .C1_SIGNED(1'b1), .C0_SHIFT(5), .RND_BIT(-1)) dut_c (
    .x(xb), .c0(c0b), .c1(c1b), .r(rc));

  int checks = 0, failures = 0;

  function automatic longint sext(longint v, int w);
    return ((v >> (w - 1)) & 1) != 0 ? v - (64'sd1 << w) : v;
  endfunction

  initial begin
    longint ea, eb, ec;
    for (int n = 0; n < 3000; n++) begin
      @(posedge clk);
      case (n)
        0: begin xa = '1; c0a = '1; c1a = 14'h1fff; xb = '1; c0b = '1; c1b = '1; end
        1: begin xa = '1; c0a = '0; c1a = 14'h2000; xb = '1; c0b = '0; c1b = 10'h200; end
        2: begin xa = '0; c0a = '1; c1a = '1;       xb = '0; c0b = '1; c1b = '1; end
        default: begin
          xa = 14'($urandom); c0a = 14'($urandom); c1a = 14'($urandom);
          xb = 10'($urandom); c0b = 10'($urandom); c1b = 10'($urandom);
        end
      endcase
      @(negedge clk);
      ea = (longint'(c0a) << 13) + sext(longint'(c1a), 14) * longint'(xa) + (64'sd1 << 12);
      eb = (longint'(c0b) << 9) + longint'(c1b) * longint'(xb) + (64'sd1 << 8);
      ec = (longint'(c0b) << 5) + sext(longint'(c1b), 10) * longint'(xb);
      checks += 3;
      if (sext(longint'(ra), 30) != ea) begin
        failures++;
        $display("FAIL a: x=%h c0=%h c1=%h r=%h expected %0d", xa, c0a, c1a, ra, ea);
      end
      if (sext(longint'(rb), 22) != eb) begin
        failures++;
        $display("FAIL b: x=%h c0=%h c1=%h r=%h expected %0d", xb, c0b, c1b, rb, eb);
      end
      if (sext(longint'(rc), 22) != ec) begin
        failures++;
        $display("FAIL c: x=%h c0=%h c1=%h r=%h expected %0d", xb, c0b, c1b, rc, ec);
      end
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
