// csa_rca_adder: multi-operand adder for the convolution output columns that
// hold three or more products. A chain of carry-save (3:2) rows folds the M
// operands into one sum vector and one carry vector; a ripple-carry adder then
// adds those two. With M == 2 only the ripple-carry adder remains, with
// M == 1 the operand passes through.
//
// Interface: sum = ops[0] + ... + ops[M-1] modulo 2^W. Choose W large enough
// for the true sum (the convolution unit does). Combinational.
module csa_rca_adder #(
  parameter int unsigned M = 4,
  parameter int unsigned W = 14
) (
  input  logic [W-1:0] ops [M],
  output logic [W-1:0] sum
);
  if (M == 1) begin : g_one
    assign sum = ops[0];
  end else begin : g_many
    // stage k holds a (sum, carry) pair that equals ops[0] + ... + ops[k+1]
    logic [W-1:0] sv [M-1];
    logic [W-1:0] cv [M-1];
    logic         unused_rca_co;

    assign sv[0] = ops[0];
    assign cv[0] = ops[1];

    for (genvar k = 1; k < M - 1; k++) begin : g_csa
      // the carry out of the top bit is dropped: W is sized for the sum
      logic [W-1:0] c_raw;
      wire          unused_c_top = c_raw[W-1];
      csa_row #(.W(W)) u_csa (
        .x(sv[k-1]), .y(cv[k-1]), .z(ops[k+1]), .s(sv[k]), .c(c_raw)
      );
      assign cv[k] = {c_raw[W-2:0], 1'b0};
    end

    rca_adder #(.W(W)) u_rca (
      .a(sv[M-2]), .b(cv[M-2]), .cin(1'b0), .s(sum), .cout(unused_rca_co)
    );
  end
endmodule
