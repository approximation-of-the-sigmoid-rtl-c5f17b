// tb_sign_xor: checks the conditional inverter at two widths with random
// words and both control values: y must equal ~a when inv is 1 and a when
// inv is 0, recomputed here bit by bit.
module tb_sign_xor;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        inv;
  logic [13:0] a14, y14;
  logic [4:0]  a5, y5;

  sign_xor #(.W(14)) dut14 (.inv(inv), .a(a14), .y(y14));
  sign_xor #(.W(5))  dut5  (.inv(inv), .a(a5),  .y(y5));

  int checks = 0, failures = 0;

  initial begin
    logic [13:0] e14;
    logic [4:0]  e5;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      inv = n[0];
      a14 = 14'($urandom);
      a5  = 5'($urandom);
      @(negedge clk);
      for (int b = 0; b < 14; b++) e14[b] = inv ? !a14[b] : a14[b];
      for (int b = 0; b < 5; b++)  e5[b]  = inv ? !a5[b]  : a5[b];
      checks += 2;
      if (y14 !== e14) begin
        failures++;
        $display("FAIL W=14 inv=%b a=%h y=%h expected %h", inv, a14, y14, e14);
      end
      if (y5 !== e5) begin
        failures++;
        $display("FAIL W=5 inv=%b a=%h y=%h expected %h", inv, a5, y5, e5);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
