// cla_adder: W-bit carry look-ahead adder, used for the convolution output
// columns that hold exactly two products.
//
// Bit i generates (g = a & b) or propagates (p = a ^ b) a carry. The bits are
// grouped by four; inside a group every carry is formed directly from the
// group's carry in and the g/p signals of the lower bits (two-level
// look-ahead), and group carries pass from group to group. The group size is
// this design's choice.
//
// Interface: s = a + b + cin modulo 2^W, cout = carry out. Combinational.
module cla_adder #(
  parameter int unsigned W = 13
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned GS = 4;
  localparam int unsigned NG = (W + GS - 1) / GS;

  logic [W-1:0] g, p;
  logic [W:0]   c;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    logic [W:0] cc;
    logic       gcin;
    logic       term;
    cc    = '0;
    cc[0] = cin;
    for (int unsigned grp = 0; grp < NG; grp++) begin
      gcin = cc[grp*GS];
      for (int unsigned j = 1; j <= GS; j++) begin
        if (grp * GS + j <= W) begin
          // carry into bit grp*GS+j: the group's carry in, propagated ...
          term = gcin;
          for (int unsigned m = 0; m < j; m++) begin
            term = term & p[grp*GS+m];
          end
          cc[grp*GS+j] = term;
          // ... or any generate inside the group that propagates up to it
          for (int unsigned m = 0; m < j; m++) begin
            term = g[grp*GS+m];
            for (int unsigned t = m + 1; t < j; t++) begin
              term = term & p[grp*GS+t];
            end
            cc[grp*GS+j] = cc[grp*GS+j] | term;
          end
        end
      end
    end
    c = cc;
  end

  assign s    = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
