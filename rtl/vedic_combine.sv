// vedic_combine: joins the four vertical and crosswise sub-products of an
// H x H split into the 2H x 2H product, one level of the Vedic multiplier
// tree.
//
// With a = {aH, aL} and b = {bH, bL}: q0 = aL*bL, q1 = aH*bL, q2 = aL*bH,
// q3 = aH*bH. The low H product bits are the low half of q0. A carry-save row
// plus ripple-carry adder forms the middle sum q1 + q2 + (q0 >> H); its low H
// bits are the next product bits and its upper H+1 bits are added to q3 to
// give the top half. The same combination as in the 4x4 block, at any width.
//
// Interface: p = q0 + ((q1 + q2) << H) + (q3 << 2H). Combinational.
module vedic_combine #(
  parameter int unsigned H = 4
) (
  input  logic [2*H-1:0] q0,
  input  logic [2*H-1:0] q1,
  input  logic [2*H-1:0] q2,
  input  logic [2*H-1:0] q3,
  output logic [4*H-1:0] p
);
  logic [2*H:0] mid_ops [3];
  logic [2*H:0] mid;
  logic         unused_hi_co;

  assign mid_ops[0] = {1'b0, q1};
  assign mid_ops[1] = {1'b0, q2};
  assign mid_ops[2] = {{(H + 1){1'b0}}, q0[2*H-1:H]};

  csa_rca_adder #(.M(3), .W(2 * H + 1)) u_mid (.ops(mid_ops), .sum(mid));

  assign p[H-1:0]   = q0[H-1:0];
  assign p[2*H-1:H] = mid[H-1:0];

  // the top half cannot overflow when the q's are true sub-products
  rca_adder #(.W(2 * H)) u_hi (
    .a(q3), .b({{(H - 1){1'b0}}, mid[2*H:H]}), .cin(1'b0),
    .s(p[4*H-1:2*H]), .cout(unused_hi_co)
  );
endmodule
