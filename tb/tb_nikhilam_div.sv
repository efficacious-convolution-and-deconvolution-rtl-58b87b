// tb_nikhilam_div: self-check of the Nikhilam divider at its default size
// (15-bit dividend, 6-bit divisor) against integer division.
// Checked: the decimal example's numbers 123 / 8 = 15 remainder 3; every
// divisor 1..63 with the largest dividend; 3000 random pairs; a zero
// divisor; the cycle count of each division (at most DW + 2 cycles from start
// to done); and that the final correction step occurs at least once.
module tb_nikhilam_div;
  localparam int DW = 15, VW = 6;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start;
  logic [DW-1:0] dividend;
  logic [VW-1:0] divisor;
  logic          busy, done, dbz, corrected;
  logic [DW-1:0] quotient;
  logic [VW-1:0] remainder;

  always #5 clk = ~clk;

  nikhilam_div dut (
    .clk(clk), .rst_n(rst_n), .start(start), .dividend(dividend),
    .divisor(divisor), .busy(busy), .done(done), .quotient(quotient),
    .remainder(remainder), .div_by_zero(dbz), .corrected(corrected)
  );

  int checks = 0, failures = 0, n_corrected = 0, max_cycles = 0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input int unsigned dd, input int unsigned dv);
    int cycles;
    @(posedge clk);
    #1;
    dividend = DW'(dd);
    divisor  = VW'(dv);
    start    = 1'b1;
    @(posedge clk);
    #1;
    start  = 1'b0;
    cycles = 1;
    while (!done) begin
      @(posedge clk);
      #1;
      cycles++;
    end
    if (cycles > max_cycles) max_cycles = cycles;
    checks++;
    if (cycles > DW + 2) begin
      failures++;
      $display("FAIL %0d / %0d took %0d cycles", dd, dv, cycles);
    end
    checks++;
    if (dv == 0) begin
      if (!dbz || quotient != '0) begin
        failures++;
        $display("FAIL divide by zero not flagged");
      end
    end else begin
      if (dbz || quotient != DW'(dd / dv) || remainder != VW'(dd % dv)) begin
        failures++;
        $display("FAIL %0d / %0d: got q=%0d r=%0d", dd, dv, quotient, remainder);
      end
      if (corrected) n_corrected++;
    end
  endtask

  initial begin
    start    = 1'b0;
    dividend = '0;
    divisor  = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;

    divide(123, 8);
    for (int d = 1; d < 64; d++) divide(32767, d);
    divide(500, 0);
    for (int k = 0; k < 3000; k++) divide($urandom_range(0, 32767), $urandom_range(1, 63));
    divide(7, 7);
    divide(0, 5);

    checks++;
    if (n_corrected == 0) begin
      failures++;
      $display("FAIL correction step never exercised");
    end
    $display("divisions corrected: %0d, longest: %0d cycles", n_corrected, max_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
