// tb_clock_gate: random enables, changed at random moments inside the clock
// period.  Every rising edge of clk must reach gclk exactly when en was high
// at the preceding falling edge, gclk must never rise outside a rising edge
// of clk, and each gclk pulse must last the whole high phase.
module tb_clock_gate;
  logic clk = 0, rst_n = 0, en = 0, gclk;
  int checks = 0, failures = 0, passed = 0, blocked = 0;
  logic en_at_fall = 1;
  realtime t_rise_clk = 0, t_rise_g = 0;

  clock_gate dut (.clk(clk), .rst_n(rst_n), .en(en), .gclk(gclk));

  always #5 clk = ~clk;

  always @(negedge clk) en_at_fall = rst_n ? en : 1'b1;   // the gate is open in reset

  // gclk rises only together with clk
  always @(posedge gclk) begin
    t_rise_g = $realtime;
    checks++;
    if (!clk || $realtime != t_rise_clk) begin failures++; $display("gclk rose at %t without clk", $realtime); end
  end
  always @(negedge gclk) if (rst_n) begin
    checks++;
    if ($realtime - t_rise_g != 5) begin failures++; $display("short gclk pulse at %t", $realtime); end
  end

  always @(posedge clk) begin
    t_rise_clk = $realtime;
    #1;
    if (rst_n) begin
      checks++;
      if (gclk != en_at_fall) begin failures++; $display("edge at %t: gclk=%b, en at fall=%b", $realtime, gclk, en_at_fall); end
      if (gclk) passed++; else blocked++;
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      #($urandom_range(1, 9));
      en = $urandom_range(0, 1);
    end
    #20;
    checks++;
    if (passed == 0 || blocked == 0) begin failures++; $display("passed %0d, blocked %0d", passed, blocked); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
