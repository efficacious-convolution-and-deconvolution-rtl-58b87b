// urdhva_mul: WA x WB-bit unsigned multiplier computed column by column with
// the Urdhva Tiryagbhyam ("vertically and crosswise") rule.
//
// For every place value k the column sum pt[k] counts the bit products
// a[i] & b[j] with i + j == k, i.e. exactly those partial products whose place
// value matches the product bit being formed. The columns are then resolved
// from the least significant one upwards: the column sum plus the carry from
// the column below gives the product bit (its LSB) and the carry into the next
// column (the rest). The per-column sum and carry widths follow from the
// operand widths. The column rule is the paper's; the carry resolution is a
// plain ripple of small column carries, which is this design's choice.
//
// Interface: p = a * b. Combinational, no clock. The 6x6 default is the size
// of the multiplier shown in the paper's simulation.
module urdhva_mul #(
  parameter int unsigned WA = 6,
  parameter int unsigned WB = 6
) (
  input  logic [WA-1:0]    a,
  input  logic [WB-1:0]    b,
  output logic [WA+WB-1:0] p
);
  localparam int unsigned NCOL = WA + WB - 1;
  localparam int unsigned MINW = (WA < WB) ? WA : WB;
  localparam int unsigned CSW  = $clog2(MINW + 1);   // width of a column sum

  logic [CSW-1:0] pt [NCOL];

  // column sums: the vertical and crosswise bit products of each place value
  always_comb begin
    for (int unsigned k = 0; k < NCOL; k++) begin
      pt[k] = '0;
      for (int unsigned i = 0; i < WA; i++) begin
        if (k >= i && k - i < WB) begin
          pt[k] = pt[k] + CSW'(a[i] & b[k-i]);
        end
      end
    end
  end

  // resolve the columns: product bit = LSB of (column sum + carry in)
  always_comb begin
    logic [CSW:0] acc;
    logic [CSW-1:0] carry;
    carry = '0;
    for (int unsigned k = 0; k < NCOL; k++) begin
      acc   = {1'b0, pt[k]} + {1'b0, carry};
      p[k]  = acc[0];
      carry = acc[CSW:1];
    end
    p[NCOL] = carry[0];
  end
endmodule
