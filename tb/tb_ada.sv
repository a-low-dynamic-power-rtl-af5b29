// tb_ada: streams block matches of 256 random pixel pairs into the ADA, back
// to back and with gaps, and checks every d(n) against a software sum of
// absolute differences, the latency of 3 clocks after the last pair and the
// throughput of one block match per 256 clocks.
module tb_ada;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  logic [7:0] a = 0, b = 0;
  logic [15:0] d;
  logic d_valid;
  int checks = 0, failures = 0;
  int exp_q[$];
  int last_cyc_q[$];
  int cyc = 0, prev_valid_cyc = -1;
  int n_bm = 40;
  int gaps256 = 0;

  ada dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_first(in_first), .in_last(in_last),
           .a(a), .b(b), .d(d), .d_valid(d_valid));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (40 * 300 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  always @(posedge clk) begin
    if (rst_n && d_valid) begin
      int e, lc;
      e  = exp_q.pop_front();
      lc = last_cyc_q.pop_front();
      checks++;
      if (int'(d) != e) begin
        failures++; $display("d=%0d expected %0d", d, e);
      end
      checks++;
      if (cyc - lc != 3) begin
        failures++; $display("latency %0d, expected 3", cyc - lc);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int m = 0; m < n_bm; m++) begin
      int sum;
      sum = 0;
      // every fourth block match uses extreme values to reach the top of the range
      for (int p = 0; p < 256; p++) begin
        @(negedge clk);
        in_valid = 1; in_first = (p == 0); in_last = (p == 255);
        if (m % 4 == 3) begin a = 8'(255); b = 8'(0); end
        else begin a = 8'($urandom); b = 8'($urandom); end
        sum += (a > b) ? int'(a) - int'(b) : int'(b) - int'(a);
        if (p == 255) begin exp_q.push_back(sum); last_cyc_q.push_back(cyc); end
        // an idle cycle in the middle of some block matches
        if (m % 5 == 2 && p == 100) begin
          @(negedge clk); in_valid = 0; a = 8'($urandom); b = 8'($urandom);
          @(negedge clk); in_valid = 0;
        end
      end
      if (m == 10) begin @(negedge clk); in_valid = 0; repeat (7) @(negedge clk); end
    end
    @(negedge clk); in_valid = 0; in_first = 0; in_last = 0;
    repeat (10) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d results missing", exp_q.size()); end
    checks++;
    if (gaps256 < 5) begin failures++; $display("only %0d back-to-back results 256 clocks apart", gaps256); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // throughput: back-to-back block matches deliver d(n) every 256 clocks
  always @(posedge clk) if (rst_n && d_valid) begin
    if (prev_valid_cyc >= 0 && cyc - prev_valid_cyc == 256) gaps256++;
    prev_valid_cyc = cyc;
  end
endmodule
