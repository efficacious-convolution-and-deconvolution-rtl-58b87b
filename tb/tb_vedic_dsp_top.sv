// tb_vedic_dsp_top: end-to-end self-check of the convolution/deconvolution
// design at its default size (N = 8 samples of 6 bits), no parameter changed.
//
// Each round convolves a random x with a random h, checks the linear and
// circular results against a reference computed here, then feeds the linear
// result and h into the deconvolution port and checks that x comes back with
// exact set. While the deconvolution runs, the convolution port is kept busy
// with a back-to-back stream of further random inputs, all checked. Some
// rounds feed a disturbed y (exact must be clear) or an h whose leading
// coefficient is 0 (div_by_zero must be set). The testbench counts how often
// each mechanism happened and fails a mechanism that never did:
// back-to-back convolutions, circular results, exact round trips, inexact
// deconvolutions, a negative or oversized quotient step, zero leading
// coefficients, Nikhilam fold steps and Nikhilam final corrections.
module tb_vedic_dsp_top;
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
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_conv = 0, n_b2b = 0, n_circ = 0, n_exact = 0, n_inexact = 0;
  int n_spoiled = 0, n_dbz = 0, n_fold = 0, n_corr = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // --------------------------------------------------- convolution checker
  typedef struct {
    int issue;
    int lin [15];
    int circ [8];
  } exp_t;
  exp_t pend [$];
  int   last_lin [15];
  int   last_issue = -10;
  bit   prev_valid = 1'b0;

  always @(posedge clk) begin
    #1;
    if (rst_n && conv_out_valid) begin
      exp_t e;
      if (pend.size() == 0) begin
        check(1'b0, "unexpected conv_out_valid");
      end else begin
        e = pend.pop_front();
        n_conv++;
        n_circ++;
        if (prev_valid) n_b2b++;
        check(cycle - e.issue == 2, "convolution latency is 2 cycles");
        for (int k = 0; k < 15; k++) begin
          check(int'(conv_y_lin[k]) == e.lin[k], $sformatf("y_lin[%0d]", k));
          last_lin[k] = int'(conv_y_lin[k]);
        end
        for (int k = 0; k < 8; k++)
          check(int'(conv_y_circ[k]) == e.circ[k], $sformatf("y_circ[%0d]", k));
      end
    end
    prev_valid = rst_n && conv_out_valid;
  end

  task automatic issue_conv(input int xs [8], input int hs [8]);
    exp_t e;
    e.issue = cycle;
    for (int k = 0; k < 15; k++) e.lin[k] = 0;
    for (int k = 0; k < 8; k++) e.circ[k] = 0;
    for (int i = 0; i < N; i++) begin
      conv_x[i] = W'(xs[i]);
      conv_h[i] = W'(hs[i]);
      for (int j = 0; j < N; j++) begin
        e.lin[i+j]       += xs[i] * hs[j];
        e.circ[(i+j) % N] += xs[i] * hs[j];
      end
    end
    conv_in_valid = 1'b1;
    pend.push_back(e);
  endtask

  // ------------------------------------------ Nikhilam divider observation
  always @(posedge clk) begin
    #1;
    if (rst_n && dut.u_deconv.u_div.busy && dut.u_deconv.u_div.head != '0) n_fold++;
    if (rst_n && dut.u_deconv.u_div.done && dut.u_deconv.u_div.corrected) n_corr++;
    if (rst_n && dec_done && dut.u_deconv.spoiled) n_spoiled++;
  end

  // ------------------------------------------------------------- rounds
  initial begin
    int xs [8], hs [8], xo [8], hb [8];
    int mode;
    conv_in_valid = 1'b0;
    dec_start     = 1'b0;
    for (int i = 0; i < N; i++) begin
      conv_x[i] = '0; conv_h[i] = '0; dec_h[i] = '0;
    end
    for (int k = 0; k < 2 * N - 1; k++) dec_y[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    for (int round = 0; round < 60; round++) begin
      mode = round % 6;   // 0-3 exact, 4 disturbed y, 5 zero leading h
      for (int i = 0; i < N; i++) begin
        xs[i] = $urandom_range(0, 63);
        hs[i] = $urandom_range(0, 63);
      end
      if (hs[N-1] == 0) hs[N-1] = 1 + $urandom_range(0, 62);
      if (mode == 5) hs[N-1] = 0;
      xo = xs;
      hb = hs;

      // convolve x and h
      @(posedge clk);
      #1 issue_conv(xs, hs);
      @(posedge clk);
      #1 conv_in_valid = 1'b0;
      repeat (2) @(posedge clk);
      #2;

      // deconvolve the result
      for (int k = 0; k < 2 * N - 1; k++) dec_y[k] = YW'(last_lin[k]);
      if (mode == 4) dec_y[2*N-2 - (round % 5)] = dec_y[2*N-2 - (round % 5)] - 1'b1 + 2'd2 * YW'(round % 2);
      for (int i = 0; i < N; i++) dec_h[i] = W'(hb[i]);
      // the convolution port carries unrelated data (not valid) meanwhile
      for (int i = 0; i < N; i++) begin
        conv_x[i] = W'($urandom);
        conv_h[i] = W'($urandom);
      end
      @(posedge clk);
      #1 dec_start = 1'b1;
      @(posedge clk);
      #1 dec_start = 1'b0;

      // meanwhile, stream convolutions back to back
      while (!dec_done) begin
        if ($urandom_range(0, 4) != 0) begin
          for (int i = 0; i < N; i++) begin
            xs[i] = $urandom_range(0, 63);
            hs[i] = $urandom_range(0, 63);
          end
          issue_conv(xs, hs);
        end else begin
          conv_in_valid = 1'b0;
        end
        @(posedge clk);
        #1;
      end
      conv_in_valid = 1'b0;
      #1;
      if (mode <= 3) begin
        check(dec_exact && !dec_dbz, $sformatf("round %0d: exact round trip", round));
        for (int i = 0; i < N; i++)
          check(int'(dec_x[i]) == xo[i], $sformatf("round %0d: x[%0d] %0d want %0d", round, i, dec_x[i], xo[i]));
        if (dec_exact) n_exact++;
      end else if (mode == 4) begin
        check(!dec_exact && !dec_dbz, $sformatf("round %0d: disturbed y not exact", round));
        if (!dec_exact) n_inexact++;
      end else begin
        check(dec_dbz && !dec_exact, $sformatf("round %0d: zero leading coefficient", round));
        if (dec_dbz) n_dbz++;
      end
      repeat (3) @(posedge clk);
    end
    repeat (4) @(posedge clk);
    check(pend.size() == 0, "every convolution produced a result");

    $display("convolutions %0d (back-to-back %0d, circular %0d)", n_conv, n_b2b, n_circ);
    $display("deconvolutions exact %0d, inexact %0d (negative/oversized step %0d), zero leading h %0d",
             n_exact, n_inexact, n_spoiled, n_dbz);
    $display("Nikhilam fold steps %0d, final corrections %0d", n_fold, n_corr);
    check(n_conv > 0, "mechanism: convolution");
    check(n_b2b > 0, "mechanism: back-to-back convolution");
    check(n_circ > 0, "mechanism: circular convolution");
    check(n_exact > 0, "mechanism: exact deconvolution");
    check(n_inexact > 0, "mechanism: inexact deconvolution");
    check(n_spoiled > 0, "mechanism: negative or oversized quotient step");
    check(n_dbz > 0, "mechanism: zero leading coefficient");
    check(n_fold > 0, "mechanism: Nikhilam fold step");
    check(n_corr > 0, "mechanism: Nikhilam final correction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
