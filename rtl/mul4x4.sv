// mul4x4: 4x4-bit unsigned Vedic (Urdhva Tiryagbhyam) multiplier.
//
// The operands are split into 2-bit halves and four 2x2 multipliers form the
// vertical and crosswise products:
//   q0 = A1A0 * B1B0   (vertical, low)      q1 = A3A2 * B1B0  (crosswise)
//   q2 = A1A0 * B3B2   (crosswise)          q3 = A3A2 * B3B2  (vertical, high)
// P1P0 is the low half of q0. A 4-bit carry-save adder adds q1, q2 and the
// high half of q0 ('0'-extended); a 5-bit adder resolves its sum and carry
// vectors into P3P2 plus three upper bits; a 4-bit adder adds those upper bits
// to q3 to give P7..P4. The block list (four 2x2 multipliers, 4-bit CSA, 5-bit
// adder, 4-bit adder) follows the published architecture; the bit-level
// wiring is this design's reading of it.
//
// Interface: p = a * b. Combinational, no clock.
module mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] csa_s, csa_c;
  logic [4:0] mid;
  logic       mid_co;
  logic       hi_co;

  mul2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  mul2x2 u_m1 (.a(a[3:2]), .b(b[1:0]), .p(q1));
  mul2x2 u_m2 (.a(a[1:0]), .b(b[3:2]), .p(q2));
  mul2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  assign p[1:0] = q0[1:0];

  // 4-bit carry save adder: q1 + q2 + {00, q0[3:2]}
  csa_row #(.W(4)) u_csa (
    .x(q1), .y(q2), .z({2'b00, q0[3:2]}), .s(csa_s), .c(csa_c)
  );

  // 5-bit adder: sum vector + carry vector (carry at weight +1)
  rca_adder #(.W(5)) u_add5 (
    .a({1'b0, csa_s}), .b({csa_c, 1'b0}), .cin(1'b0), .s(mid), .cout(mid_co)
  );
  assign p[3:2] = mid[1:0];

  // 4-bit adder: q3 + upper bits of the middle sum
  rca_adder #(.W(4)) u_add4 (
    .a(q3), .b({1'b0, mid[4:2]}), .cin(1'b0), .s(p[7:4]), .cout(hi_co)
  );

  // mid_co and hi_co are always 0: 15*15 fits in 8 bits and the middle sum
  // is at most 2*9 + 3 = 21 < 32.
  wire unused_ok = mid_co | hi_co;
endmodule
