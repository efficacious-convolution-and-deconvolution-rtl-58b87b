// vedic_dsp_top: convolution and deconvolution engines built on Vedic
// (Urdhva Tiryagbhyam) multipliers and a Nikhilam divider, side by side.
//
// * conv_unit computes, fully pipelined, the 2N-1 samples of the linear
//   convolution x*h and the N samples of the circular convolution of two
//   N-sample, W-bit unsigned sequences (2-cycle latency, one per cycle).
// * deconv_unit takes a (2N-1)-sample y and the N-sample h and recovers x by
//   carry-free long division (sequential, roughly N*(divider steps + 2)
//   cycles), reporting whether the division was exact.
// The two engines share only the clock and reset, so a host can convolve and
// deconvolve at the same time; feeding y_lin and conv_h back into the
// deconvolution port undoes the convolution. Defaults N = 8, W = 6 are the
// sizes of the paper's convolution simulation. Port timing is that of
// the two units (see their headers).
module vedic_dsp_top
  import vedic_pkg::*;
#(
  parameter int unsigned N  = 8,
  parameter int unsigned W  = 6,
  localparam int unsigned YW = conv_out_width(W, N)
) (
  input  logic          clk,
  input  logic          rst_n,
  // convolution
  input  logic          conv_in_valid,
  input  logic [W-1:0]  conv_x [N],
  input  logic [W-1:0]  conv_h [N],
  output logic          conv_out_valid,
  output logic [YW-1:0] conv_y_lin  [2*N-1],
  output logic [YW-1:0] conv_y_circ [N],
  // deconvolution
  input  logic          dec_start,
  input  logic [YW-1:0] dec_y [2*N-1],
  input  logic [W-1:0]  dec_h [N],
  output logic          dec_busy,
  output logic          dec_done,
  output logic [W-1:0]  dec_x [N],
  output logic          dec_exact,
  output logic          dec_div_by_zero
);
  conv_unit #(.N(N), .W(W)) u_conv (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (conv_in_valid),
    .x        (conv_x),
    .h        (conv_h),
    .out_valid(conv_out_valid),
    .y_lin    (conv_y_lin),
    .y_circ   (conv_y_circ)
  );

  deconv_unit #(.N(N), .W(W)) u_deconv (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (dec_start),
    .y_in       (dec_y),
    .h_in       (dec_h),
    .busy       (dec_busy),
    .done       (dec_done),
    .x_out      (dec_x),
    .exact      (dec_exact),
    .div_by_zero(dec_div_by_zero)
  );
endmodule
