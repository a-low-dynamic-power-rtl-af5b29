// bm_counter: BM-process counters of the DVFS controller.
//
// n counts the block matches evaluated for the current M-Blk; n_r counts the
// block matches since d(n) last decreased (the run length of the flat part of
// the d(n) curve).  clr zeroes both.  On each cycle with step high n is
// incremented and n_r is zeroed if new_min is high, else incremented.  So
// after the BM where the minimum was found (n = n_m) n_r is 0, and it equals
// n - n_m afterwards.  Both update on the rising edge.
module bm_counter #(
  parameter int N_W = 9
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic           step,
  input  logic           new_min,
  output logic [N_W-1:0] n,
  output logic [N_W-1:0] n_r
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      n <= '0; n_r <= '0;
    end else if (clr) begin
      n <= '0; n_r <= '0;
    end else if (step) begin
      n   <= n + 1'b1;
      n_r <= new_min ? '0 : n_r + 1'b1;
    end
  end
endmodule
