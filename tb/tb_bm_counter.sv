// tb_bm_counter: random step / new_min patterns; checks n and n_r against a
// software model, including clears.
module tb_bm_counter;
  logic clk = 0, rst_n = 0, clr = 0, step = 0, new_min = 0;
  logic [8:0] n, n_r;
  int checks = 0, failures = 0, mn = 0, mr = 0;

  bm_counter #(.N_W(9)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .step(step), .new_min(new_min), .n(n), .n_r(n_r));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 10000; t++) begin
      clr     = ($urandom_range(0, 499) == 0);
      step    = ($urandom_range(0, 2) != 0);
      new_min = ($urandom_range(0, 19) == 0);
      @(posedge clk);
      if (clr) begin mn = 0; mr = 0; end
      else if (step) begin mn = (mn + 1) % 512; mr = new_min ? 0 : (mr + 1) % 512; end
      @(negedge clk);
      checks++;
      if (int'(n) != mn || int'(n_r) != mr) begin
        failures++; if (failures < 10) $display("n=%0d n_r=%0d expected %0d %0d", n, n_r, mn, mr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
