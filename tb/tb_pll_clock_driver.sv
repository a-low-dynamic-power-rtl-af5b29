// tb_pll_clock_driver: for each k measures the output period over 20 cycles
// and checks the frequency against 680/340/170/85/43 MHz (within 0.5 %);
// checks that reset holds the output low.
module tb_pll_clock_driver;
  logic rst_n = 0;
  logic [3:0] k = 4'd8;
  logic clk_out;
  int checks = 0, failures = 0;
  int fc[5] = '{43, 85, 170, 340, 680};

  pll_clock_driver dut (.rst_n(rst_n), .k(k), .clk_out(clk_out));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    real f;
    #100ns;
    checks++;
    if (clk_out !== 1'b0) begin failures++; $display("clock runs in reset"); end
    rst_n = 1;
    for (int kk = 4; kk <= 8; kk++) begin
      k = 4'(kk);
      repeat (3) @(posedge clk_out);
      t0 = $realtime;
      repeat (20) @(posedge clk_out);
      t1 = $realtime;
      f = 20.0 / ((t1 - t0) / 1us);   // MHz
      checks++;
      if (f < fc[kk-4] * 0.995 || f > fc[kk-4] * 1.005) begin
        failures++; $display("k=%0d: %f MHz expected %0d", kk, f, fc[kk-4]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
