// tb_vedic_mul_nxn: self-check of the recursive Vedic multiplier. The 16x16
// default is checked on corner values and 20000 random pairs; an 8x8
// instance (one recursion level above the 4x4 leaf) is checked exhaustively.
module tb_vedic_mul_nxn;
  logic [15:0] a16, b16;
  logic [31:0] p16;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  int checks = 0, failures = 0;

  vedic_mul_nxn dut16 (.a(a16), .b(b16), .p(p16));
  vedic_mul_nxn #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] ref_p;
    a16 = x;
    b16 = y;
    #1;
    ref_p = 32'(x) * 32'(y);
    checks++;
    if (p16 !== ref_p) begin
      failures++;
      if (failures < 10) $display("FAIL16 %0d*%0d: got %0d want %0d", x, y, p16, ref_p);
    end
  endtask

  initial begin
    check16(16'hFFFF, 16'hFFFF);
    check16(16'h0000, 16'hFFFF);
    check16(16'h8000, 16'h8000);
    check16(16'h00FF, 16'hFF00);
    for (int k = 0; k < 20000; k++) check16(16'($urandom), 16'($urandom));
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i);
        b8 = 8'(j);
        #1;
        checks++;
        if (p8 !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL8 %0d*%0d: got %0d", i, j, p8);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
