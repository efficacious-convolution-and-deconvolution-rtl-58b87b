// tb_cla_adder: self-check of the carry look-ahead adder at its default
// width (13 bits, three full groups and one partial group) on carry-chain
// corner cases and random operands, with and without carry in.
module tb_cla_adder;
  localparam int W = 13;
  logic [W-1:0] a, b, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cla_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y, input logic c);
    logic [W:0] ref_s;
    a   = x;
    b   = y;
    cin = c;
    #1;
    ref_s = (W+1)'(x) + (W+1)'(y) + (W+1)'(c);
    checks++;
    if ({cout, s} !== ref_s) begin
      failures++;
      if (failures < 10) $display("FAIL %0d+%0d+%0d: got %0d", x, y, c, {cout, s});
    end
  endtask

  initial begin
    check('1, '0, 1'b1);       // carry ripples through every group
    check('1, '1, 1'b1);
    check('0, '0, 1'b0);
    check(13'h0AAA, 13'h1555, 1'b1);
    for (int k = 0; k < 20000; k++) check(W'($urandom), W'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
