// tb_max_detector: feeds groups of four random values (with random gaps and
// occasional clears) and checks the running maximum against a software model.
module tb_max_detector;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [8:0] x = 0, max;
  int checks = 0, failures = 0, model = 0;

  max_detector #(.W(9)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .x(x), .max(max));

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int g = 0; g < 2000; g++) begin
      @(negedge clk); clr = 1; en = 0;
      @(posedge clk); model = 0;
      for (int i = 0; i < 4; i++) begin
        @(negedge clk); clr = 0; en = ($urandom_range(0, 4) != 0);
        x = 9'($urandom_range(0, 450));
        @(posedge clk);
        if (en && int'(x) > model) model = int'(x);
      end
      @(negedge clk); en = 0;
      checks++;
      if (int'(max) != model) begin
        failures++; if (failures < 10) $display("max=%0d expected %0d", max, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
