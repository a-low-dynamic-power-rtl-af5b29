// tb_dvfs_table: checks the five operating points (fc, VD, n_p, switch) row by
// row, that fc halves from row to row, that n_p block matches of 256 clocks fit
// in a 170 us M-Blk slot at fc, and the fallback for k outside 4..8.
module tb_dvfs_table;
  import me_pkg::*;
  logic [3:0]  k;
  dvfs_point_t pt;
  int checks = 0, failures = 0;

  dvfs_table dut (.k(k), .pt(pt));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_row(int kk, int fc, int vd, int np, int sw);
    k = 4'(kk);
    #1;
    checks++;
    if (int'(pt.fc_mhz) != fc || int'(pt.vd_mv) != vd || int'(pt.np) != np || int'(pt.sw_n) != (5'h1f & ~(1 << sw))) begin
      failures++;
      $display("k=%0d: fc=%0d vd=%0d np=%0d sw_n=%b", kk, pt.fc_mhz, pt.vd_mv, pt.np, pt.sw_n);
    end
    // n_p * 256 cycles at fc must fit in 170 us: np*256 <= fc[MHz]*170
    checks++;
    if (int'(pt.np) * 256 > int'(pt.fc_mhz) * 170) begin
      failures++; $display("k=%0d: n_p does not fit the M-Blk slot", kk);
    end
  endtask

  initial begin
    int prev;
    expect_row(8, 680, 1000, 450, 0);
    expect_row(7, 340,  600, 225, 1);
    expect_row(6, 170,  500, 112, 2);
    expect_row(5,  85,  450,  56, 3);
    expect_row(4,  43,  400,  28, 4);
    expect_row(0, 680, 1000, 450, 0);
    expect_row(15, 680, 1000, 450, 0);
    prev = 0;
    for (int kk = 4; kk <= 8; kk++) begin
      k = 4'(kk); #1;
      if (kk > 4) begin
        checks++;
        if (int'(pt.fc_mhz) < 2 * prev - 1 || int'(pt.fc_mhz) > 2 * prev) begin failures++; $display("fc does not double at k=%0d", kk); end
      end
      prev = int'(pt.fc_mhz);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
