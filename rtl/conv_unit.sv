// conv_unit: pipelined linear and circular convolution of two N-sample
// sequences of W-bit unsigned samples, computed like a multiplication without
// carries between columns.
//
// Structure (front to back):
//   * N*N Vedic multipliers form every product x[i]*h[j] at once; multiplier
//     j*N+i takes x[i] and h[j].
//   * A latch (here an edge-triggered register) holds all products.
//   * Output column n adds the products with i+j == n. The outer columns
//     y[0] and y[2N-2] hold one product and need no adder, columns with two
//     products use a carry look-ahead adder, columns with three or more a
//     carry-save reduction followed by a ripple-carry adder. No carry passes
//     from one column to the next: every column is a full-width sample.
//   * The N-point circular convolution folds the linear result:
//     yc[n] = y[n] + y[n+N] for n < N-1 and yc[N-1] = y[N-1], each fold a
//     carry look-ahead adder.
// The multiplier array, latch and per-column adder kinds follow the
// paper's architecture; the fold for the circular result, the register
// timing and the valid handshake are this design's choice.
//
// Timing: in_valid with x and h at a rising edge loads the products; the next
// edge loads y_lin and y_circ and raises out_valid for one cycle per input.
// Latency is 2 cycles, one new convolution can start every cycle.
// Reset (rst_n low, synchronous) clears the valid bits and the registers.
// All output samples share the width 2W + clog2(N); the top bits of the
// outer columns (one or two products) are therefore always zero.
module conv_unit
  import vedic_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned W  = 6,
  localparam int unsigned YW = conv_out_width(W, N),
  localparam int unsigned PW = 2 * W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [W-1:0]  x [N],
  input  logic [W-1:0]  h [N],
  output logic          out_valid,
  output logic [YW-1:0] y_lin  [2*N-1],
  output logic [YW-1:0] y_circ [N]
);
  // ---------------------------------------------------------------- products
  logic [PW-1:0] prod   [N*N];
  logic [PW-1:0] prod_q [N*N];
  logic          prod_v;

  for (genvar j = 0; j < N; j++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      vedic_mul #(.W(W)) u_vm (.a(x[i]), .b(h[j]), .p(prod[j*N+i]));
    end
  end

  // ------------------------------------------------------------------- latch
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prod_v <= 1'b0;
      for (int k = 0; k < N * N; k++) prod_q[k] <= '0;
    end else begin
      prod_v <= in_valid;
      if (in_valid) prod_q <= prod;
    end
  end

  // --------------------------------------------------------- column adders
  logic [YW-1:0] col_sum [2*N-1];

  for (genvar n = 0; n < 2 * N - 1; n++) begin : g_sum
    localparam int unsigned M  = col_terms(n, N);
    localparam int unsigned I0 = (n < N) ? 0 : n - (N - 1);  // lowest x index
    logic [YW-1:0] ops [M];

    for (genvar t = 0; t < M; t++) begin : g_op
      // term t: x[I0+t] * h[n-I0-t]
      assign ops[t] = YW'(prod_q[(n - I0 - t) * N + I0 + t]);
    end

    if (M == 1) begin : g_direct
      assign col_sum[n] = ops[0];
    end else if (M == 2) begin : g_cla
      logic unused_co;
      cla_adder #(.W(YW)) u_cla (
        .a(ops[0]), .b(ops[1]), .cin(1'b0), .s(col_sum[n]), .cout(unused_co)
      );
    end else begin : g_csa_rca
      csa_rca_adder #(.M(M), .W(YW)) u_add (.ops(ops), .sum(col_sum[n]));
    end
  end

  // ------------------------------------------------------- circular fold
  logic [YW-1:0] circ_sum [N];

  for (genvar n = 0; n < N; n++) begin : g_fold
    if (n < N - 1) begin : g_add
      logic unused_co;
      cla_adder #(.W(YW)) u_cla (
        .a(col_sum[n]), .b(col_sum[n+N]), .cin(1'b0),
        .s(circ_sum[n]), .cout(unused_co)
      );
    end else begin : g_pass
      assign circ_sum[n] = col_sum[n];
    end
  end

  // ---------------------------------------------------------- output stage
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      for (int k = 0; k < 2 * N - 1; k++) y_lin[k] <= '0;
      for (int k = 0; k < N; k++) y_circ[k] <= '0;
    end else begin
      out_valid <= prod_v;
      if (prod_v) begin
        y_lin  <= col_sum;
        y_circ <= circ_sum;
      end
    end
  end
endmodule
