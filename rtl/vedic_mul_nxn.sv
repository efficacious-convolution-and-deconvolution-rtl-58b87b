// vedic_mul_nxn: NxN-bit unsigned Vedic multiplier for N a power of two
// (N >= 4), reduced to 4x4 Vedic multiplier blocks.
//
// Both operands are cut into D = N/4 digits of 4 bits. Level 0 multiplies
// every digit pair with a 4x4 block (mul4x4). Each following level doubles
// the chunk size: the product of a chunk pair of size 2S is joined from the
// four level-below products of its halves (vertical aL*bL and aH*bH,
// crosswise aH*bL and aL*bH) by vedic_combine. After log2(D) levels one
// product is left. The reduction of NxN to 4x4 structures is the paper's;
// the level-by-level tree and the combining adders are this design's.
//
// Interface: p = a * b. Combinational, no clock. N = 16 by default, the
// largest multiplier size the paper quotes.
module vedic_mul_nxn #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned D  = N / 4;                   // 4-bit digits
  localparam int unsigned LV = (D > 1) ? $clog2(D) : 0;  // levels above 4x4

  // Level l holds, in pr[j*C+i], the product of chunk i of a and chunk j
  // of b, with C = D >> l chunks per operand and chunk size 4 << l.
  // Level 0: the 4x4 blocks.
  logic [7:0] pr0 [D*D];
  for (genvar i = 0; i < D; i++) begin : g_a
    for (genvar j = 0; j < D; j++) begin : g_b
      mul4x4 u_m (.a(a[4*i +: 4]), .b(b[4*j +: 4]), .p(pr0[j*D+i]));
    end
  end

  for (genvar l = 1; l <= LV; l++) begin : g_lvl
    localparam int unsigned S  = 4 << (l - 1);   // child chunk size
    localparam int unsigned C  = D >> l;         // chunks at this level
    localparam int unsigned CC = 2 * C;          // chunks one level below
    logic [2*S-1:0] below [CC*CC];
    logic [4*S-1:0] pr    [C*C];

    if (l == 1) begin : g_from_leaf
      assign below = pr0;
    end else begin : g_from_level
      assign below = g_lvl[l-1].pr;
    end

    for (genvar i = 0; i < C; i++) begin : g_a
      for (genvar j = 0; j < C; j++) begin : g_b
        vedic_combine #(.H(S)) u_join (
          .q0(below[(2*j)*CC + 2*i]),
          .q1(below[(2*j)*CC + 2*i + 1]),
          .q2(below[(2*j+1)*CC + 2*i]),
          .q3(below[(2*j+1)*CC + 2*i + 1]),
          .p (pr[j*C+i])
        );
      end
    end
  end

  if (LV == 0) begin : g_single
    assign p = pr0[0];
  end else begin : g_top
    assign p = g_lvl[LV].pr[0];
  end

  initial begin
    assert (N >= 4 && (N & (N - 1)) == 0)
      else $error("vedic_mul_nxn: N must be a power of two and at least 4");
  end
endmodule
