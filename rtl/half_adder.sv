// half_adder: one-bit half adder (sum = a ^ b, carry = a & b). It is the HA
// cell of the 2x2 array multiplier. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
