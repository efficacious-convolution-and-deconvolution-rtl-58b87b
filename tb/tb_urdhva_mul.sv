// tb_urdhva_mul: self-check of the column-wise Urdhva multiplier. The 6x6
// default is checked exhaustively, and on 37*26 = 962 (a = 100101,
// b = 011010) also its eleven internal column sums; a 15x6 instance, the
// shape used inside the divider, is checked on random pairs.
module tb_urdhva_mul;
  logic [5:0]  a, b;
  logic [11:0] p;
  logic [14:0] wa;
  logic [5:0]  wb;
  logic [20:0] wp;
  int checks = 0, failures = 0;

  urdhva_mul dut (.a(a), .b(b), .p(p));
  urdhva_mul #(.WA(15), .WB(6)) dut_wide (.a(wa), .b(wb), .p(wp));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 6'b100101;
    b = 6'b011010;
    #1;
    checks++;
    if (p !== 12'b001111000010) begin
      failures++;
      $display("FAIL waveform pair: got %b", p);
    end
    // the waveform's column sums pt0..pt10, numbered from the most
    // significant column (pt0 = a5&b5) down to the least (pt10 = a0&b0)
    begin
      int unsigned fig_pt [11];
      fig_pt = '{0, 1, 1, 0, 2, 1, 1, 2, 0, 1, 0};
      for (int j = 0; j < 11; j++) begin
        checks++;
        if (int'(dut.pt[10-j]) != fig_pt[j]) begin
          failures++;
          $display("FAIL column sum pt%0d: got %0d want %0d", j, dut.pt[10-j], fig_pt[j]);
        end
      end
    end
    for (int i = 0; i < 64; i++) begin
      for (int j = 0; j < 64; j++) begin
        a = 6'(i);
        b = 6'(j);
        #1;
        checks++;
        if (p !== 12'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    for (int k = 0; k < 5000; k++) begin
      wa = 15'($urandom);
      wb = 6'($urandom);
      #1;
      checks++;
      if (wp !== 21'(wa) * 21'(wb)) begin
        failures++;
        if (failures < 10) $display("FAIL wide %0d*%0d: got %0d", wa, wb, wp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
