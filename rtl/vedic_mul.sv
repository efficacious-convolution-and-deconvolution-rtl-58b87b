// vedic_mul: W x W-bit unsigned Vedic multiplier that picks its structure
// from the sample width. W == 2 uses the 2x2 block, W == 4 the 4x4 block, a
// larger power of two the recursive tree of 4x4 blocks, and any other width
// (for example the 6-bit samples of the default convolution) the bit-level
// column-by-column Urdhva multiplier. The choice by width is this design's.
//
// Interface: p = a * b. Combinational, no clock.
module vedic_mul #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  if (W == 2) begin : g_2
    mul2x2 u_m (.a(a), .b(b), .p(p));
  end else if (W == 4) begin : g_4
    mul4x4 u_m (.a(a), .b(b), .p(p));
  end else if (W > 4 && (W & (W - 1)) == 0) begin : g_tree
    vedic_mul_nxn #(.N(W)) u_m (.a(a), .b(b), .p(p));
  end else begin : g_col
    urdhva_mul #(.WA(W), .WB(W)) u_m (.a(a), .b(b), .p(p));
  end
endmodule
