// csa_row: one W-bit carry-save (3:2) stage. Each bit position is a full adder
// that takes one bit of x, y and z and produces a sum bit (same weight) and a
// carry bit (next weight). No carry travels between positions, so the delay is
// one full adder whatever W is. Combinational.
//
// Interface: x + y + z == s + (c << 1), with c given at its own weight
// (c[i] belongs to weight i+1).
module csa_row #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(z[i]), .s(s[i]), .co(c[i]));
  end
endmodule
