// tb_nm_sram: writes random words to all 396 entries, reads them back in a
// random order with the one-clock read latency, then overwrites a subset.
module tb_nm_sram;
  logic clk = 0, we = 0;
  logic [8:0] addr = 0, wdata = 0, rdata;
  int checks = 0, failures = 0;
  int model[396];

  nm_sram #(.DEPTH(396), .W(9)) dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic rd_check(int a);
    @(negedge clk); we = 0; addr = 9'(a);
    @(negedge clk);
    checks++;
    if (int'(rdata) != model[a]) begin
      failures++; if (failures < 10) $display("addr %0d: %0d expected %0d", a, rdata, model[a]);
    end
  endtask

  initial begin
    for (int a = 0; a < 396; a++) begin
      @(negedge clk); we = 1; addr = 9'(a); wdata = 9'($urandom); model[a] = int'(wdata);
    end
    for (int t = 0; t < 800; t++) rd_check($urandom_range(0, 395));
    for (int t = 0; t < 100; t++) begin
      int a;
      a = $urandom_range(0, 395);
      @(negedge clk); we = 1; addr = 9'(a); wdata = 9'($urandom); model[a] = int'(wdata);
    end
    for (int a = 0; a < 396; a++) rd_check(a);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
