// tb_nq_quantizer: all 512 values of Max. n_m; k is found independently by
// searching for 2^(k+1) > Max. n_m >= 2^k, then clamped to 4..8.
module tb_nq_quantizer;
  logic [8:0] max_nm, nq;
  logic [3:0] k;
  int checks = 0, failures = 0;

  nq_quantizer #(.N_W(9), .K(4), .K_MAX(8), .K_W(4)) dut (.max_nm(max_nm), .k(k), .nq(nq));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      int ek;
      ek = 0;
      for (int j = 0; j < 10; j++) if ((1 << (j + 1)) > v && v >= (1 << j)) ek = j;
      if (ek <= 4) ek = 4;
      if (ek > 8) ek = 8;
      max_nm = 9'(v);
      #1;
      checks++;
      if (int'(k) != ek || int'(nq) != (1 << ek)) begin
        failures++;
        if (failures < 10) $display("max_nm=%0d k=%0d nq=%0d expected k=%0d", v, k, nq, ek);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
