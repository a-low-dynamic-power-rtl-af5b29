// tb_abs_diff: exhaustive check of the 8-bit absolute differencer against
// integer arithmetic for all 65536 input pairs.
module tb_abs_diff;
  logic [7:0] a, b, y;
  int checks = 0, failures = 0;

  abs_diff #(.W(8)) dut (.a(a), .b(b), .y(y));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        int exp_v;
        a = 8'(i); b = 8'(j);
        #1;
        exp_v = (i > j) ? i - j : j - i;
        checks++;
        if (int'(y) != exp_v) begin
          failures++;
          if (failures < 10) $display("abs_diff(%0d,%0d)=%0d expected %0d", i, j, y, exp_v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
