// tb_conv_unit: self-check of the pipelined convolution unit.
//
// Two instances: the default one (N = 8 samples of 6 bits) and a 4-sample,
// 4-bit one, whose multipliers are the 4x4 Vedic blocks. Checked:
//   * the worked example f = (8, 9, 11, 10), g = (13, 12, 14, 15), whose
//     linear convolution is 104, 213, 363, 508, 409, 305, 150 (4-bit unit);
//   * all-ones 6-bit inputs, y[n] = min(n+1, 15-n) * 63 * 63 (default unit);
//   * a back-to-back stream of random inputs on both units, one per cycle,
//     against a reference convolution computed here, with out_valid required
//     exactly 2 cycles after in_valid;
//   * the circular outputs against a reference circular convolution.
module tb_conv_unit;
  localparam int N8 = 8, W8 = 6, YW8 = 15;
  localparam int N4 = 4, W4 = 4, YW4 = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           iv8, ov8, iv4, ov4;
  logic [W8-1:0]  x8 [N8], h8 [N8];
  logic [YW8-1:0] yl8 [2*N8-1], yc8 [N8];
  logic [W4-1:0]  x4 [N4], h4 [N4];
  logic [YW4-1:0] yl4 [2*N4-1], yc4 [N4];

  conv_unit dut8 (.clk(clk), .rst_n(rst_n), .in_valid(iv8), .x(x8), .h(h8),
                  .out_valid(ov8), .y_lin(yl8), .y_circ(yc8));
  conv_unit #(.N(N4), .W(W4)) dut4 (.clk(clk), .rst_n(rst_n), .in_valid(iv4),
                  .x(x4), .h(h4), .out_valid(ov4), .y_lin(yl4), .y_circ(yc4));

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, in issue order
  typedef struct {
    int issue;
    int lin [15];
    int circ [8];
  } exp_t;
  exp_t q8 [$];
  exp_t q4 [$];

  function automatic exp_t reference(input int xs [8], input int hs [8], input int n, input int issue);
    exp_t e;
    e.issue = issue;
    for (int k = 0; k < 15; k++) e.lin[k] = 0;
    for (int k = 0; k < 8; k++) e.circ[k] = 0;
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) begin
        e.lin[i+j] += xs[i] * hs[j];
        e.circ[(i+j) % n] += xs[i] * hs[j];
      end
    end
    return e;
  endfunction

  // checkers
  always @(posedge clk) begin
    #1;
    if (rst_n && ov8) begin
      exp_t e;
      if (q8.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid (8)");
      end else begin
        e = q8.pop_front();
        checks++;
        if (cycle - e.issue != 2) begin
          failures++;
          $display("FAIL latency (8): %0d cycles", cycle - e.issue);
        end
        for (int k = 0; k < 2 * N8 - 1; k++) begin
          checks++;
          if (int'(yl8[k]) != e.lin[k]) begin
            failures++;
            $display("FAIL y_lin8[%0d] got %0d want %0d", k, yl8[k], e.lin[k]);
          end
        end
        for (int k = 0; k < N8; k++) begin
          checks++;
          if (int'(yc8[k]) != e.circ[k]) begin
            failures++;
            $display("FAIL y_circ8[%0d] got %0d want %0d", k, yc8[k], e.circ[k]);
          end
        end
      end
    end
    if (rst_n && ov4) begin
      exp_t e;
      if (q4.size() == 0) begin
        failures++;
        $display("FAIL unexpected out_valid (4)");
      end else begin
        e = q4.pop_front();
        checks++;
        if (cycle - e.issue != 2) begin
          failures++;
          $display("FAIL latency (4): %0d cycles", cycle - e.issue);
        end
        for (int k = 0; k < 2 * N4 - 1; k++) begin
          checks++;
          if (int'(yl4[k]) != e.lin[k]) begin
            failures++;
            $display("FAIL y_lin4[%0d] got %0d want %0d", k, yl4[k], e.lin[k]);
          end
        end
        for (int k = 0; k < N4; k++) begin
          checks++;
          if (int'(yc4[k]) != e.circ[k]) begin
            failures++;
            $display("FAIL y_circ4[%0d] got %0d want %0d", k, yc4[k], e.circ[k]);
          end
        end
      end
    end
  end

  // issue one input set to each unit at the current cycle
  task automatic issue8(input int xs [8], input int hs [8]);
    for (int i = 0; i < N8; i++) begin
      x8[i] = W8'(xs[i]);
      h8[i] = W8'(hs[i]);
    end
    iv8 = 1'b1;
    q8.push_back(reference(xs, hs, N8, cycle));
  endtask

  task automatic issue4(input int xs [8], input int hs [8]);
    for (int i = 0; i < N4; i++) begin
      x4[i] = W4'(xs[i]);
      h4[i] = W4'(hs[i]);
    end
    iv4 = 1'b1;
    q4.push_back(reference(xs, hs, N4, cycle));
  endtask

  initial begin
    int xs [8], hs [8];
    iv8 = 1'b0;
    iv4 = 1'b0;
    for (int i = 0; i < N8; i++) begin x8[i] = '0; h8[i] = '0; end
    for (int i = 0; i < N4; i++) begin x4[i] = '0; h4[i] = '0; end
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    #1;

    // worked example, f = (8, 9, 11, 10), g = (13, 12, 14, 15)
    xs = '{8, 9, 11, 10, 0, 0, 0, 0};
    hs = '{13, 12, 14, 15, 0, 0, 0, 0};
    issue4(xs, hs);
    // all-ones 6-bit sequences
    xs = '{63, 63, 63, 63, 63, 63, 63, 63};
    hs = '{63, 63, 63, 63, 63, 63, 63, 63};
    issue8(xs, hs);
    @(posedge clk);
    #1;
    iv4 = 1'b0;
    iv8 = 1'b0;
    @(posedge clk);
    #1;

    // hard-coded expectations of the worked example
    begin
      int want [7];
      int m;
      want = '{104, 213, 363, 508, 409, 305, 150};
      @(posedge clk);
      #2;
      for (int k = 0; k < 7; k++) begin
        checks++;
        if (int'(yl4[k]) != want[k]) begin
          failures++;
          $display("FAIL example y[%0d] got %0d want %0d", k, yl4[k], want[k]);
        end
      end
      for (int k = 0; k < 15; k++) begin
        m = (k + 1 < 15 - k) ? k + 1 : 15 - k;
        checks++;
        if (int'(yl8[k]) != m * 3969) begin
          failures++;
          $display("FAIL all-ones y[%0d] got %0d", k, yl8[k]);
        end
      end
    end

    // back-to-back random stream with occasional gaps
    for (int t = 0; t < 400; t++) begin
      @(posedge clk);
      #1;
      iv8 = 1'b0;
      iv4 = 1'b0;
      if ($urandom_range(0, 3) != 0) begin
        for (int i = 0; i < 8; i++) begin
          xs[i] = $urandom_range(0, 63);
          hs[i] = $urandom_range(0, 63);
        end
        issue8(xs, hs);
        for (int i = 0; i < 8; i++) begin
          xs[i] = $urandom_range(0, 15);
          hs[i] = $urandom_range(0, 15);
        end
        issue4(xs, hs);
      end
    end
    @(posedge clk);
    #1;
    iv8 = 1'b0;
    iv4 = 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (q8.size() != 0 || q4.size() != 0) begin
      failures++;
      $display("FAIL results missing: %0d %0d", q8.size(), q4.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
