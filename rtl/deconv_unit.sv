// deconv_unit: deconvolution of y = x * h, recovering the N samples of x from
// the 2N-1 samples of y and the N samples of h, by long division without
// carries between columns.
//
// The sequences are handled highest index first, as in long division: the
// running remainder starts as y; in step i (i = N-1 down to 0) the quotient
// sample x[i] is the leading remainder sample r[i+N-1] divided by the leading
// coefficient h[N-1] (Nikhilam divider), and the N partial products
// x[i]*h[j] (N Vedic multipliers) are subtracted from r[i+j], column by
// column, with no borrow between columns. When y really is x*h every
// remainder sample ends at zero and exact is raised. The method (Nikhilam
// division plus Vedic partial products, highest index first) is the
// paper's; the handling of inputs that are not an exact convolution is
// this design's: a negative leading remainder gives a quotient sample of 0,
// a quotient above 2^W-1 is saturated, and either case, or any nonzero final
// remainder sample, clears exact. A zero leading coefficient h[N-1] ends the
// operation at once with div_by_zero set and x all zero.
//
// Interface and timing: a start pulse while idle loads y_in and h_in; busy is
// high while working; done pulses for one cycle when x_out, exact and
// div_by_zero are valid; they hold until the next start. Each output sample
// takes one cycle to start the divider, the divider's cycles, and one cycle to
// subtract the partial products; one more cycle checks the remainder.
// Synchronous active-low reset.
module deconv_unit
  import vedic_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned W  = 6,
  localparam int unsigned YW = conv_out_width(W, N),
  localparam int unsigned RW = YW + 1   // signed running remainder
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [YW-1:0] y_in [2*N-1],
  input  logic [W-1:0]  h_in [N],
  output logic          busy,
  output logic          done,
  output logic [W-1:0]  x_out [N],
  output logic          exact,
  output logic          div_by_zero
);
  typedef enum logic [2:0] {
    S_IDLE,
    S_DIV,
    S_WAIT,
    S_SUB,
    S_CHECK
  } state_e;

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  state_e                state;
  logic signed [RW-1:0]  r [2*N-1];
  logic [W-1:0]          hq [N];
  logic [IW-1:0]         idx;
  logic [W-1:0]          q;
  logic                  spoiled;   // a step could not be exact

  // ------------------------------------------------------------- divider
  logic          div_start, div_busy, div_done, div_dbz, div_corr;
  logic [YW-1:0] div_q;
  logic [W-1:0]  div_rem;
  logic signed [RW-1:0] lead;

  assign lead      = r[int'(idx) + N - 1];
  assign div_start = (state == S_DIV) && (lead >= 0);

  nikhilam_div #(.DW(YW), .VW(W)) u_div (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (div_start),
    .dividend   (YW'(lead)),
    .divisor    (hq[N-1]),
    .busy       (div_busy),
    .done       (div_done),
    .quotient   (div_q),
    .remainder  (div_rem),
    .div_by_zero(div_dbz),
    .corrected  (div_corr)
  );
  wire unused_div = div_busy | div_dbz | div_corr | (|div_rem);

  // ------------------------------------------------- partial products
  logic [2*W-1:0] pp [N];
  for (genvar j = 0; j < N; j++) begin : g_pp
    vedic_mul #(.W(W)) u_vm (.a(q), .b(hq[j]), .p(pp[j]));
  end

  // --------------------------------------------------------------- control
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      busy        <= 1'b0;
      done        <= 1'b0;
      exact       <= 1'b0;
      div_by_zero <= 1'b0;
      spoiled     <= 1'b0;
      idx         <= '0;
      q           <= '0;
      for (int k = 0; k < 2 * N - 1; k++) r[k] <= '0;
      for (int k = 0; k < N; k++) begin
        hq[k]    <= '0;
        x_out[k] <= '0;
      end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            for (int k = 0; k < 2 * N - 1; k++) r[k] <= RW'(y_in[k]);
            for (int k = 0; k < N; k++) x_out[k] <= '0;
            hq      <= h_in;
            idx     <= IW'(N - 1);
            spoiled <= 1'b0;
            exact   <= 1'b0;
            if (h_in[N-1] == '0) begin
              div_by_zero <= 1'b1;
              done        <= 1'b1;
            end else begin
              div_by_zero <= 1'b0;
              busy        <= 1'b1;
              state       <= S_DIV;
            end
          end
        end
        S_DIV: begin
          if (lead >= 0) begin
            state <= S_WAIT;          // divider started this cycle
          end else begin
            q       <= '0;            // remainder went negative: not exact
            spoiled <= 1'b1;
            state   <= S_SUB;
          end
        end
        S_WAIT: begin
          if (div_done) begin
            if (div_q > YW'({W{1'b1}})) begin
              q       <= '1;
              spoiled <= 1'b1;
            end else begin
              q <= W'(div_q);
            end
            state <= S_SUB;
          end
        end
        S_SUB: begin
          for (int j = 0; j < N; j++) begin
            r[int'(idx) + j] <= r[int'(idx) + j] - RW'(pp[j]);
          end
          x_out[idx] <= q;
          if (idx == '0) begin
            state <= S_CHECK;
          end else begin
            idx   <= idx - 1'b1;
            state <= S_DIV;
          end
        end
        S_CHECK: begin
          exact <= !spoiled;
          for (int k = 0; k < 2 * N - 1; k++) begin
            if (r[k] != '0) exact <= 1'b0;
          end
          busy  <= 1'b0;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
