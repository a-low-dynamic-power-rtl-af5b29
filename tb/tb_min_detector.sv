// tb_min_detector: random d(n) sequences; checks d_min, n_m, the displacement
// of the minimum and the new_min flag against a software model, including
// ties (an equal value must not replace the earlier minimum).
module tb_min_detector;
  import me_pkg::*;
  logic clk = 0, rst_n = 0, clr = 0, en = 0;
  logic [15:0] d = 0, d_min;
  logic [8:0]  n = 0, n_m;
  mvec_t       mv = '0, mv_m;
  logic        new_min;
  int checks = 0, failures = 0;
  int m_d, m_n, m_x, m_y, ties = 0;
  bit m_empty;

  min_detector dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .d(d), .n(n), .mv(mv),
                    .new_min(new_min), .d_min(d_min), .n_m(n_m), .mv_m(mv_m));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 50; blk++) begin
      @(negedge clk); clr = 1; en = 0;
      @(posedge clk); m_empty = 1;
      @(negedge clk); clr = 0;
      for (int i = 1; i <= 200; i++) begin
        bit exp_new;
        en = ($urandom_range(0, 3) != 0);
        d  = 16'($urandom_range(0, 300) + (200 - i) * 20);
        n  = 9'(i);
        mv.x = MV_W'($urandom_range(0, 20) - 10);
        mv.y = MV_W'($urandom_range(0, 20) - 10);
        #1;
        exp_new = en && (m_empty || int'(d) < m_d);
        if (en && !m_empty && int'(d) == m_d) ties++;
        checks++;
        if (new_min != exp_new) begin failures++; $display("new_min=%b expected %b", new_min, exp_new); end
        @(posedge clk);
        if (exp_new) begin m_empty = 0; m_d = int'(d); m_n = i; m_x = int'(mv.x); m_y = int'(mv.y); end
        @(negedge clk);
        if (!m_empty) begin
          checks++;
          if (int'(d_min) != m_d || int'(n_m) != m_n || int'(mv_m.x) != m_x || int'(mv_m.y) != m_y) begin
            failures++;
            if (failures < 10) $display("min (%0d,%0d,%0d,%0d) expected (%0d,%0d,%0d,%0d)",
                                        d_min, n_m, mv_m.x, mv_m.y, m_d, m_n, m_x, m_y);
          end
        end
      end
    end
    en = 0;
    checks++;
    if (ties == 0) begin failures++; $display("no tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
