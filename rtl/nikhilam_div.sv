// nikhilam_div: sequential unsigned divider using the Nikhilam sutra
// ("all from 9 and the last from 10"), carried over from base 10 to base 2.
//
// The divisor d is k bits long (k = position of its leading one + 1), so the
// base is B = 2^k and its complement c = B - d (the binary counterpart of the
// ten's complement of the decimal method). The running remainder R is split
// at the base into a head h = R >> k and a tail t = R mod B. Because
// R = h*B + t = h*d + (h*c + t), one step adds h to the quotient and replaces
// R by h*c + t: only a multiplication by the small complement (done by the
// column-wise Vedic multiplier) and an addition, no trial subtraction. Since
// d >= B/2, c <= d and R at least halves each step until the head is zero.
// Then a remainder that is still not below the divisor is corrected once:
// the quotient gains one and d is subtracted (the paper's rule "divide the
// remainder by the denominator and add the new quotient to the original
// quotient"); afterwards R < d. The algorithm is the paper's; choosing the
// base from the divisor's bit length and the handshake are this design's.
//
// Interface and timing: a start pulse while idle loads dividend and divisor;
// busy is high while working; done pulses for one cycle when quotient and
// remainder are valid; they hold until the next start. One fold step per
// clock, then one cycle for the final check: at most about DW - k + 2 cycles.
// A zero divisor finishes at once with div_by_zero set, quotient 0 and
// remainder 0 (the paper does not treat it). corrected tells that the
// final correction step was needed. Synchronous active-low reset.
module nikhilam_div #(
  parameter int unsigned DW = 15,  // dividend and quotient width
  parameter int unsigned VW = 6    // divisor and remainder width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [DW-1:0] dividend,
  input  logic [VW-1:0] divisor,
  output logic          busy,
  output logic          done,
  output logic [DW-1:0] quotient,
  output logic [VW-1:0] remainder,
  output logic          div_by_zero,
  output logic          corrected
);
  localparam int unsigned KW = $clog2(VW + 1);

  logic [DW-1:0] r;
  logic [VW-1:0] d;
  logic [VW-1:0] comp;
  logic [KW-1:0] k;

  // ------------------------------------------ base of the divisor (2^k)
  logic [KW-1:0] k_in;
  logic [VW:0]   base_in;
  always_comb begin
    k_in = '0;
    for (int unsigned i = 0; i < VW; i++) begin
      if (divisor[i]) k_in = KW'(i + 1);
    end
    base_in = (VW + 1)'(1) << k_in;
  end

  // ------------------------------------------------- one Nikhilam step
  logic [DW-1:0]    head, tail;
  logic [DW+VW-1:0] head_x_comp;
  logic [DW-1:0]    r_fold;

  assign head = r >> k;
  assign tail = r & ~({DW{1'b1}} << k);

  urdhva_mul #(.WA(DW), .WB(VW)) u_mul (.a(head), .b(comp), .p(head_x_comp));

  // head*comp + tail <= r, so the sum fits in DW bits
  assign r_fold = head_x_comp[DW-1:0] + tail;
  wire unused_hi = |head_x_comp[DW+VW-1:DW];

  // ------------------------------------------------------------ control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy        <= 1'b0;
      done        <= 1'b0;
      quotient    <= '0;
      remainder   <= '0;
      div_by_zero <= 1'b0;
      corrected   <= 1'b0;
      r           <= '0;
      d           <= '0;
      comp        <= '0;
      k           <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          corrected <= 1'b0;
          if (divisor == '0) begin
            quotient    <= '0;
            remainder   <= '0;
            div_by_zero <= 1'b1;
            done        <= 1'b1;
          end else begin
            div_by_zero <= 1'b0;
            r           <= dividend;
            d           <= divisor;
            k           <= k_in;
            comp        <= VW'(base_in - (VW + 1)'(divisor));
            quotient    <= '0;
            busy        <= 1'b1;
          end
        end
      end else if (head != '0) begin
        r        <= r_fold;
        quotient <= quotient + head;
      end else begin
        // head is zero: r < 2^k, at most one correction is left
        if (r >= DW'(d)) begin
          quotient  <= quotient + 1'b1;
          remainder <= VW'(r - DW'(d));
          corrected <= 1'b1;
        end else begin
          remainder <= VW'(r);
        end
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

  // a start while busy is ignored; flag it in simulation
  always_ff @(posedge clk) begin
    if (rst_n && busy) begin
      assert (!start) else $warning("nikhilam_div: start ignored while busy");
    end
  end
endmodule
