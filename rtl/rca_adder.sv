// rca_adder: W-bit ripple-carry adder built from a chain of full adders.
// It is the final (carry-propagate) stage after carry-save reduction and the
// plain adders inside the Vedic multiplier. Combinational.
//
// Interface: s = a + b + cin modulo 2^W, cout = carry out of bit W-1.
module rca_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  assign cout = c[W];
endmodule
