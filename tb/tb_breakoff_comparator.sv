// tb_breakoff_comparator: random and corner values of n, n_r, n_q, n_p; checks
// the three break-off conditions and the combined stop.
module tb_breakoff_comparator;
  logic [8:0] n, n_r, nq, np;
  logic hit_nq, hit_np, hit_all, stop;
  int checks = 0, failures = 0;

  breakoff_comparator #(.N_W(9), .N_MAX(441)) dut (.n(n), .n_r(n_r), .nq(nq), .np(np),
    .hit_nq(hit_nq), .hit_np(hit_np), .hit_all(hit_all), .stop(stop));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int qs[5] = '{16, 32, 64, 128, 256};
    int ps[5] = '{28, 56, 112, 225, 450};
    for (int t = 0; t < 20000; t++) begin
      int i, vn, vr;
      i  = $urandom_range(0, 4);
      vn = $urandom_range(0, 460);
      vr = (t % 3 == 0) ? qs[i] - 1 + $urandom_range(0, 2) : $urandom_range(0, vn);
      if (t % 7 == 0) vn = ps[i] - 1 + $urandom_range(0, 2);
      if (t % 11 == 0) vn = 440 + $urandom_range(0, 1);
      n = 9'(vn); n_r = 9'(vr); nq = 9'(qs[i]); np = 9'(ps[i]);
      #1;
      checks++;
      if (hit_nq != (vr >= qs[i]) || hit_np != (vn >= ps[i]) || hit_all != (vn >= 441) ||
          stop != ((vr >= qs[i]) || (vn >= ps[i]) || (vn >= 441))) begin
        failures++;
        if (failures < 10) $display("n=%0d n_r=%0d nq=%0d np=%0d -> %b%b%b %b", vn, vr, qs[i], ps[i], hit_nq, hit_np, hit_all, stop);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
