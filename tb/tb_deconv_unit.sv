// tb_deconv_unit: self-check of the deconvolution unit.
//
// Two instances: the default one (N = 8 samples of 6 bits) and a 4-sample,
// 4-bit one. Checked:
//   * the long-division example: h = 4 5 3 4 and y = 16 28 34 37 17 12
//     (highest index first) give x = 4 2 3, i.e. x = (3, 2, 4, 0);
//   * the convolution example run backwards: y = 104 213 363 508 409 305 150
//     and h = (13, 12, 14, 15) give x = (8, 9, 11, 10);
//   * 200 random exact cases on the default unit (y made here as x*h);
//   * perturbed y (not a convolution by h) clears exact;
//   * h[N-1] == 0 sets div_by_zero;
//   * every run ends within N*(DW + 4) + 2 cycles of start.
module tb_deconv_unit;
  localparam int N8 = 8, W8 = 6, YW8 = 15;
  localparam int N4 = 4, W4 = 4, YW4 = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           st8, busy8, done8, ex8, dz8;
  logic [YW8-1:0] y8 [2*N8-1];
  logic [W8-1:0]  h8 [N8], x8 [N8];
  logic           st4, busy4, done4, ex4, dz4;
  logic [YW4-1:0] y4 [2*N4-1];
  logic [W4-1:0]  h4 [N4], x4 [N4];

  deconv_unit dut8 (.clk(clk), .rst_n(rst_n), .start(st8), .y_in(y8), .h_in(h8),
                    .busy(busy8), .done(done8), .x_out(x8), .exact(ex8), .div_by_zero(dz8));
  deconv_unit #(.N(N4), .W(W4)) dut4 (.clk(clk), .rst_n(rst_n), .start(st4), .y_in(y4),
                    .h_in(h4), .busy(busy4), .done(done4), .x_out(x4), .exact(ex4),
                    .div_by_zero(dz4));

  int checks = 0, failures = 0;

  initial begin
    repeat (200000) @(posedge clk);
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

  // run the 4-sample unit; ys and hs are indexed by sample number
  task automatic run4(input int ys [7], input int hs [4], input int xs [4],
                      input bit want_exact, input bit want_dz, input string name);
    int cycles;
    for (int k = 0; k < 7; k++) y4[k] = YW4'(ys[k]);
    for (int k = 0; k < 4; k++) h4[k] = W4'(hs[k]);
    @(posedge clk);
    #1 st4 = 1'b1;
    @(posedge clk);
    #1 st4 = 1'b0;
    cycles = 1;
    while (!done4) begin
      @(posedge clk);
      #1 cycles++;
    end
    check(cycles <= N4 * (YW4 + 4) + 2, {name, ": cycle count"});
    check(ex4 == want_exact, {name, ": exact flag"});
    check(dz4 == want_dz, {name, ": div_by_zero flag"});
    if (want_exact) begin
      for (int k = 0; k < 4; k++) check(int'(x4[k]) == xs[k], $sformatf("%s: x[%0d]=%0d", name, k, x4[k]));
    end
  endtask

  task automatic run8(input int xs [8], input int hs [8], input int bump,
                      input bit want_exact, input bit want_dz, input string name);
    int cycles;
    int ys [15];
    for (int k = 0; k < 15; k++) ys[k] = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) ys[i+j] += xs[i] * hs[j];
    ys[bump % 15] += (bump > 0) ? 1 : 0;
    for (int k = 0; k < 15; k++) y8[k] = YW8'(ys[k]);
    for (int k = 0; k < 8; k++) h8[k] = W8'(hs[k]);
    @(posedge clk);
    #1 st8 = 1'b1;
    @(posedge clk);
    #1 st8 = 1'b0;
    cycles = 1;
    while (!done8) begin
      @(posedge clk);
      #1 cycles++;
    end
    check(cycles <= N8 * (YW8 + 4) + 2, {name, ": cycle count"});
    check(ex8 == want_exact, {name, ": exact flag"});
    check(dz8 == want_dz, {name, ": div_by_zero flag"});
    if (want_exact) begin
      for (int k = 0; k < 8; k++) check(int'(x8[k]) == xs[k], $sformatf("%s: x[%0d]=%0d", name, k, x8[k]));
    end
  endtask

  initial begin
    int ys4 [7];
    int hs4 [4];
    int xs4 [4];
    int xs [8];
    int hs [8];
    st8 = 1'b0;
    st4 = 1'b0;
    for (int k = 0; k < 15; k++) y8[k] = '0;
    for (int k = 0; k < 8; k++) h8[k] = '0;
    for (int k = 0; k < 7; k++) y4[k] = '0;
    for (int k = 0; k < 4; k++) h4[k] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    // long-division example
    ys4 = '{12, 17, 37, 34, 28, 16, 0};
    hs4 = '{4, 3, 5, 4};
    xs4 = '{3, 2, 4, 0};
    run4(ys4, hs4, xs4, 1'b1, 1'b0, "division example");
    // convolution example backwards
    ys4 = '{104, 213, 363, 508, 409, 305, 150};
    hs4 = '{13, 12, 14, 15};
    xs4 = '{8, 9, 11, 10};
    run4(ys4, hs4, xs4, 1'b1, 1'b0, "convolution example");
    // not a convolution by h
    ys4 = '{104, 213, 363, 508, 409, 306, 150};
    run4(ys4, hs4, xs4, 1'b0, 1'b0, "perturbed example");
    // zero leading coefficient
    hs4 = '{13, 12, 14, 0};
    run4(ys4, hs4, xs4, 1'b0, 1'b1, "zero leading coefficient");

    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < 8; i++) begin
        xs[i] = $urandom_range(0, 63);
        hs[i] = $urandom_range(0, 63);
      end
      if (hs[7] == 0) hs[7] = 1;
      run8(xs, hs, 0, 1'b1, 1'b0, "random exact");
    end
    for (int t = 0; t < 20; t++) begin
      for (int i = 0; i < 8; i++) begin
        xs[i] = $urandom_range(0, 63);
        hs[i] = $urandom_range(0, 63);
      end
      hs[7] = 1 + $urandom_range(0, 62);
      run8(xs, hs, 1 + t % 14, 1'b0, 1'b0, "random perturbed");
    end
    hs[7] = 0;
    run8(xs, hs, 0, 1'b0, 1'b1, "random zero leading coefficient");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
