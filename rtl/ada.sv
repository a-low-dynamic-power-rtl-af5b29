// ada: two-stage pipelined absolute difference accumulator (ADA).
//
// Computes d(n), the sum over one 16x16 block match of |A - B|, one pixel pair
// per clock.  Structure as in the processor's circuit diagram: the two 8-bit
// inputs are registered (input registers), their absolute difference is
// registered in the pipeline register (stage 1), and the 16-bit accumulator
// adds it into its output register (stage 2).
//
// Interface: drive a/b with in_valid; mark the first pixel pair of a block
// match with in_first and the last with in_last.  Timing: d_valid is high, and
// d holds the complete d(n), for one clock cycle, the third cycle after the
// one that carried in_last (latency 3).  Back-to-back block
// matches are accepted with no gap, so a 256-pixel match takes 256 cycles.
// The first/last/valid flags travelling with the data are this design's own
// choice; the processor description gives only the datapath.
module ada
  import me_pkg::*;
#(
  parameter int PIX_W_P = PIX_W,
  parameter int ACC_W   = D_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_first,
  input  logic               in_last,
  input  logic [PIX_W_P-1:0] a,
  input  logic [PIX_W_P-1:0] b,
  output logic [ACC_W-1:0]   d,
  output logic               d_valid
);
  // input registers
  logic [PIX_W_P-1:0] a_r, b_r;
  logic               v0, f0, l0;
  // pipeline register
  logic [PIX_W_P-1:0] ad, ad_r;
  logic               v1, f1, l1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_r <= '0; b_r <= '0; v0 <= 1'b0; f0 <= 1'b0; l0 <= 1'b0;
      ad_r <= '0; v1 <= 1'b0; f1 <= 1'b0; l1 <= 1'b0;
      d_valid <= 1'b0;
    end else begin
      a_r <= a;  b_r <= b;
      v0  <= in_valid; f0 <= in_valid & in_first; l0 <= in_valid & in_last;
      ad_r <= ad;
      v1  <= v0; f1 <= f0; l1 <= l0;
      d_valid <= v1 & l1;
    end
  end

  abs_diff #(.W(PIX_W_P)) u_adc (.a(a_r), .b(b_r), .y(ad));

  accumulator #(.IN_W(PIX_W_P), .ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .en(v1), .load(f1), .x(ad_r), .acc(d)
  );
endmodule
