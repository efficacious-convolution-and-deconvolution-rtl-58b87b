// tb_paper_workloads: runs the paper's worked examples through the complete
// design at its default size (8 samples of 6 bits), each checked against
// values worked out by hand:
//   1. convolution of the all-ones 6-bit sequences of the paper's 8-sample
//      simulation: y[n] = min(n+1, 15-n) * 3969, circular samples 31752;
//   2. convolution f = (8, 9, 11, 10), g = (13, 12, 14, 15), zero-padded:
//      y = 104 213 363 508 409 305 150 0 ...;
//   3. deconvolution of that result by g, which returns f. The 4-sample g is
//      placed in the upper samples (h = g shifted by 4) so that its leading
//      coefficient h[7] is not zero; y is shifted by the same 4 samples;
//   4. deconvolution 16 28 34 37 17 12 / 4 5 3 4 = 4 2 3 (highest index
//      first), placed the same way;
//   5. a 6x6 product of the paper's multiplier waveform, 37 * 26 = 962, as
//      the single-sample convolution x = (37, 0, ...), h = (26, 0, ...).
module tb_paper_workloads;
  localparam int N = 8, W = 6, YW = 15;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic          conv_in_valid, conv_out_valid;
  logic [W-1:0]  conv_x [N], conv_h [N];
  logic [YW-1:0] conv_y_lin [2*N-1], conv_y_circ [N];
  logic          dec_start, dec_busy, dec_done, dec_exact, dec_dbz;
  logic [YW-1:0] dec_y [2*N-1];
  logic [W-1:0]  dec_h [N], dec_x [N];

  vedic_dsp_top dut (
    .clk(clk), .rst_n(rst_n),
    .conv_in_valid(conv_in_valid), .conv_x(conv_x), .conv_h(conv_h),
    .conv_out_valid(conv_out_valid), .conv_y_lin(conv_y_lin), .conv_y_circ(conv_y_circ),
    .dec_start(dec_start), .dec_y(dec_y), .dec_h(dec_h), .dec_busy(dec_busy),
    .dec_done(dec_done), .dec_x(dec_x), .dec_exact(dec_exact), .dec_div_by_zero(dec_dbz)
  );

  int checks = 0, failures = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic convolve(input int xs [8], input int hs [8]);
    for (int i = 0; i < N; i++) begin
      conv_x[i] = W'(xs[i]);
      conv_h[i] = W'(hs[i]);
    end
    @(posedge clk);
    #1 conv_in_valid = 1'b1;
    @(posedge clk);
    #1 conv_in_valid = 1'b0;
    @(posedge clk);
    #1 check(conv_out_valid, "convolution result after 2 cycles");
  endtask

  task automatic deconvolve(input int ys [15], input int hs [8]);
    for (int k = 0; k < 2 * N - 1; k++) dec_y[k] = YW'(ys[k]);
    for (int i = 0; i < N; i++) dec_h[i] = W'(hs[i]);
    @(posedge clk);
    #1 dec_start = 1'b1;
    @(posedge clk);
    #1 dec_start = 1'b0;
    while (!dec_done) begin
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    int xs [8], hs [8], ys [15], want [15];
    conv_in_valid = 1'b0;
    dec_start     = 1'b0;
    for (int i = 0; i < N; i++) begin
      conv_x[i] = '0; conv_h[i] = '0; dec_h[i] = '0;
    end
    for (int k = 0; k < 2 * N - 1; k++) dec_y[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // 1. all-ones sequences
    xs = '{63, 63, 63, 63, 63, 63, 63, 63};
    hs = xs;
    convolve(xs, hs);
    for (int k = 0; k < 15; k++) begin
      int m;
      m = (k + 1 < 15 - k) ? k + 1 : 15 - k;
      check(int'(conv_y_lin[k]) == m * 3969, $sformatf("all-ones y[%0d] = %0d", k, conv_y_lin[k]));
    end
    for (int k = 0; k < 8; k++)
      check(int'(conv_y_circ[k]) == 31752, $sformatf("all-ones yc[%0d] = %0d", k, conv_y_circ[k]));

    // 2. worked convolution example
    xs   = '{8, 9, 11, 10, 0, 0, 0, 0};
    hs   = '{13, 12, 14, 15, 0, 0, 0, 0};
    want = '{104, 213, 363, 508, 409, 305, 150, 0, 0, 0, 0, 0, 0, 0, 0};
    convolve(xs, hs);
    for (int k = 0; k < 15; k++)
      check(int'(conv_y_lin[k]) == want[k], $sformatf("example y[%0d] = %0d", k, conv_y_lin[k]));

    // 3. and back: y shifted by 4, h shifted by 4
    ys = '{0, 0, 0, 0, 104, 213, 363, 508, 409, 305, 150, 0, 0, 0, 0};
    hs = '{0, 0, 0, 0, 13, 12, 14, 15};
    deconvolve(ys, hs);
    check(dec_exact && !dec_dbz, "example deconvolution exact");
    xs = '{8, 9, 11, 10, 0, 0, 0, 0};
    for (int i = 0; i < N; i++)
      check(int'(dec_x[i]) == xs[i], $sformatf("example x[%0d] = %0d", i, dec_x[i]));

    // 4. long-division example 16 28 34 37 17 12 / 4 5 3 4 = 4 2 3
    ys = '{0, 0, 0, 0, 12, 17, 37, 34, 28, 16, 0, 0, 0, 0, 0};
    hs = '{0, 0, 0, 0, 4, 3, 5, 4};
    deconvolve(ys, hs);
    check(dec_exact && !dec_dbz, "division example exact");
    xs = '{3, 2, 4, 0, 0, 0, 0, 0};
    for (int i = 0; i < N; i++)
      check(int'(dec_x[i]) == xs[i], $sformatf("division example x[%0d] = %0d", i, dec_x[i]));

    // 5. the 6x6 multiplier waveform pair
    xs = '{37, 0, 0, 0, 0, 0, 0, 0};
    hs = '{26, 0, 0, 0, 0, 0, 0, 0};
    convolve(xs, hs);
    check(int'(conv_y_lin[0]) == 962, $sformatf("37*26 = %0d", conv_y_lin[0]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
