// spiral_gen: search order of the candidate displacements.
//
// The motion search starts at the centre of the search window and moves
// outward.  This generator walks a square spiral: right 1, down 1, left 2,
// up 2, right 3, down 3, ... so every ring of Chebyshev radius r is finished
// before ring r+1 begins.  2*P segments of lengths 1,1,2,2,...,2P,2P followed by
// the closing 2P steps visit all (2P+1)^2 positions of a +/-P window exactly
// once.  restart returns to (0,0); next moves one position on the rising edge.
// The direction of rotation and starting side are this design's choice.
module spiral_gen
  import me_pkg::*;
#(
  parameter int P = SR_P
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  restart,
  input  logic  next,
  output mvec_t mv
);
  typedef enum logic [1:0] {RIGHT, DOWN, LEFT, UP} dir_t;
  localparam int L_W = $clog2(2*P+2);

  dir_t           dir;
  logic [L_W-1:0] seg_len, steps;
  logic           last_step;

  assign last_step = (steps + 1'b1 == seg_len);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mv <= '0; dir <= RIGHT; seg_len <= L_W'(1); steps <= '0;
    end else if (restart) begin
      mv <= '0; dir <= RIGHT; seg_len <= L_W'(1); steps <= '0;
    end else if (next) begin
      unique case (dir)
        RIGHT: mv.x <= mv.x + 1'b1;
        DOWN:  mv.y <= mv.y + 1'b1;
        LEFT:  mv.x <= mv.x - 1'b1;
        UP:    mv.y <= mv.y - 1'b1;
      endcase
      if (last_step) begin
        steps <= '0;
        dir   <= dir_t'(dir + 1'b1);
        if (dir == DOWN || dir == UP) seg_len <= seg_len + 1'b1;
      end else begin
        steps <= steps + 1'b1;
      end
    end
  end
endmodule
