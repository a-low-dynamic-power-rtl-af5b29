// tb_dcdc_converter: each single switch gives its supply (1.00, 0.60, 0.50,
// 0.45, 0.40 V); no switch gives 0 V.
module tb_dcdc_converter;
  logic [4:0]  sw_n;
  logic [10:0] vd_mv;
  int checks = 0, failures = 0;
  int exp_mv[5] = '{1000, 600, 500, 450, 400};

  dcdc_converter #(.VDD_MV(1000)) dut (.sw_n(sw_n), .vd_mv(vd_mv));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sw_n = 5'b11111; #1;
    checks++; if (vd_mv != 0) begin failures++; $display("all off: %0d mV", vd_mv); end
    for (int m = 0; m < 5; m++) begin
      sw_n = 5'h1f & ~(5'd1 << m);
      #1;
      checks++;
      if (int'(vd_mv) != exp_mv[m]) begin failures++; $display("SW%0d: %0d mV expected %0d", m + 1, vd_mv, exp_mv[m]); end
    end
    sw_n = 5'b11111; #1;
    checks++; if (vd_mv != 0) begin failures++; $display("all off: %0d mV", vd_mv); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
