// tb_spiral_gen: steps through 441 candidates and checks the order against a
// model that walks the square spiral by whole segments; additionally every
// position of the +/-10 window must appear exactly once and the Chebyshev
// radius must never decrease.  Restart is checked
// in the middle of a walk.
module tb_spiral_gen;
  import me_pkg::*;
  logic clk = 0, rst_n = 0, restart = 0, next = 0;
  mvec_t mv;
  int checks = 0, failures = 0;
  int ex[441], ey[441];
  bit seen[21][21];

  spiral_gen #(.P(10)) dut (.clk(clk), .rst_n(rst_n), .restart(restart), .next(next), .mv(mv));

  always #5 clk = ~clk;

  function automatic int cheb(int x, int y);
    int ax = x < 0 ? -x : x;
    int ay = y < 0 ? -y : y;
    return ax > ay ? ax : ay;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // reference order: segments of length 1,1,2,2,... turning right, down, left, up
    int x, y, idx, len, dir;
    int dx[4] = '{1, 0, -1, 0};
    int dy[4] = '{0, 1, 0, -1};
    x = 0; y = 0; idx = 0; len = 1; dir = 0;
    ex[0] = 0; ey[0] = 0;
    while (idx < 440) begin
      for (int rep = 0; rep < 2 && idx < 440; rep++) begin
        for (int s = 0; s < len && idx < 440; s++) begin
          x += dx[dir]; y += dy[dir]; idx++; ex[idx] = x; ey[idx] = y;
        end
        dir = (dir + 1) % 4;
      end
      len++;
    end

    repeat (2) @(posedge clk);
    rst_n = 1;
    // partial walk, then restart
    @(negedge clk); next = 1;
    repeat (37) @(negedge clk);
    next = 0; restart = 1;
    @(negedge clk); restart = 0;
    for (int i = 0; i < 441; i++) begin
      checks++;
      if (int'(mv.x) != ex[i] || int'(mv.y) != ey[i]) begin
        failures++; if (failures < 10) $display("n=%0d (%0d,%0d) expected (%0d,%0d)", i + 1, mv.x, mv.y, ex[i], ey[i]);
      end
      checks++;
      if (int'(mv.x) < -10 || int'(mv.x) > 10 || int'(mv.y) < -10 || int'(mv.y) > 10 ||
          seen[int'(mv.x) + 10][int'(mv.y) + 10]) begin
        failures++; $display("n=%0d (%0d,%0d) outside the window or repeated", i + 1, mv.x, mv.y);
      end else seen[int'(mv.x) + 10][int'(mv.y) + 10] = 1;
      if (i > 0) begin
        checks++;
        if (cheb(int'(mv.x), int'(mv.y)) < cheb(ex[i-1], ey[i-1])) begin failures++; $display("radius decreased at n=%0d", i + 1); end
      end
      next = (i != 440);
      @(negedge clk);
    end
    next = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
