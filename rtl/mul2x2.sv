// mul2x2: 2x2-bit unsigned multiplier, the leaf of the Vedic multiplier tree.
//
// Four AND gates form the partial products A0B0, A0B1, A1B0 and A1B1. The
// least significant product bit C0 is A0B0 itself and passes no adder. A first
// half adder adds the two middle partial products (A0B1 + A1B0) to give C1 and
// a carry; a second half adder adds A1B1 and that carry to give C2 (sum) and
// C3 (carry). This is the structure of the classic 2-bit array multiplier.
//
// Interface: a = A1A0, b = B1B0, p = C3..C0. Combinational, no clock.
module mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic pp00, pp01, pp10, pp11;
  logic c_mid;

  assign pp00 = a[0] & b[0];
  assign pp01 = a[0] & b[1];
  assign pp10 = a[1] & b[0];
  assign pp11 = a[1] & b[1];

  assign p[0] = pp00;

  half_adder u_ha_lo (.a(pp01), .b(pp10),  .s(p[1]), .c(c_mid));
  half_adder u_ha_hi (.a(pp11), .b(c_mid), .s(p[2]), .c(p[3]));
endmodule
