// csa_row: one row of full adders (a 3:2 carry-save compressor) used to
// reduce the partial product matrix of mac_unit. Three W-bit rows in, a sum
// row and a carry row out, with a + b + c == s + co (mod 2^W). The carry row
// is shifted one place left; the carry out of the top bit is dropped, which
// is exact because mac_unit sizes its rows so that the true sum fits.
//
// Timing: combinational, one full-adder delay.
module csa_row #(
  parameter int W = 29
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] s,
  output logic [W-1:0] co
);

  logic [W-1:0] maj;

  assign s   = a ^ b ^ c;
  assign maj = (a & b) | (a & c) | (b & c);
  assign co  = {maj[W-2:0], 1'b0};

endmodule
