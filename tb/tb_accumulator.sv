// tb_accumulator: random load/add/hold sequences on the 16-bit accumulator,
// compared cycle by cycle with an integer model (sum modulo 2^16).
module tb_accumulator;
  logic clk = 0, rst_n = 0, en = 0, load = 0;
  logic [7:0]  x = 0;
  logic [15:0] acc;
  int checks = 0, failures = 0;
  int model = 0;

  accumulator #(.IN_W(8), .ACC_W(16)) dut (.clk(clk), .rst_n(rst_n), .en(en), .load(load), .x(x), .acc(acc));

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
    checks++; if (acc != 0) failures++;
    for (int t = 0; t < 5000; t++) begin
      en   = ($urandom_range(0, 9) != 0);
      load = ($urandom_range(0, 300) == 0);
      x    = 8'($urandom);
      @(posedge clk);
      if (en) model = load ? int'(x) : (model + int'(x)) % 65536;
      @(negedge clk);
      checks++;
      if (int'(acc) != model) begin
        failures++;
        if (failures < 10) $display("t=%0d acc=%0d expected %0d", t, acc, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
