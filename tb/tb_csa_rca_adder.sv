// tb_csa_rca_adder: self-check of the carry-save + ripple-carry multi-operand
// adder: the default 4 operands of 14 bits, plus 3- and 8-operand instances,
// on all-ones operands and random ones.
module tb_csa_rca_adder;
  logic [13:0] ops4 [4];
  logic [13:0] sum4;
  logic [15:0] ops3 [3];
  logic [15:0] sum3;
  logic [14:0] ops8 [8];
  logic [14:0] sum8;
  int checks = 0, failures = 0;

  csa_rca_adder dut4 (.ops(ops4), .sum(sum4));
  csa_rca_adder #(.M(3), .W(16)) dut3 (.ops(ops3), .sum(sum3));
  csa_rca_adder #(.M(8), .W(15)) dut8 (.ops(ops8), .sum(sum8));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 10001; k++) begin
      int unsigned r4, r3, r8;
      r4 = 0; r3 = 0; r8 = 0;
      for (int i = 0; i < 4; i++) begin
        ops4[i] = (k == 0) ? 14'(4095) : 14'($urandom_range(0, 4095));
        r4 += ops4[i];
      end
      for (int i = 0; i < 3; i++) begin
        ops3[i] = (k == 0) ? 16'hFFFF : 16'($urandom);
        r3 += ops3[i];
      end
      for (int i = 0; i < 8; i++) begin
        ops8[i] = (k == 0) ? 15'(3969) : 15'($urandom_range(0, 3969));
        r8 += ops8[i];
      end
      #1;
      checks += 3;
      if (sum4 !== 14'(r4)) begin failures++; if (failures < 10) $display("FAIL4 got %0d want %0d", sum4, r4); end
      if (sum3 !== 16'(r3)) begin failures++; if (failures < 10) $display("FAIL3 got %0d want %0d", sum3, 16'(r3)); end
      if (sum8 !== 15'(r8)) begin failures++; if (failures < 10) $display("FAIL8 got %0d want %0d", sum8, r8); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
