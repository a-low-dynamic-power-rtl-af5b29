// breakoff_comparator: comparator of the DVFS controller deciding break-off.
//
// The block-match process of an M-Blk stops when n_r, the count of block
// matches since the last decrease of d(n), reaches the quantized n_q.  It also
// stops when n reaches n_p, the number of block matches that fit into one
// M-Blk slot at the chosen clock, or when the whole search window (N_MAX
// candidates) has been searched.  The last two are this design's guards; with
// the table's numbers the n_q condition normally comes first.  Combinational;
// the three reasons are reported separately.
module breakoff_comparator #(
  parameter int N_W   = 9,
  parameter int N_MAX = 441
) (
  input  logic [N_W-1:0] n,
  input  logic [N_W-1:0] n_r,
  input  logic [N_W-1:0] nq,
  input  logic [N_W-1:0] np,
  output logic           hit_nq,
  output logic           hit_np,
  output logic           hit_all,
  output logic           stop
);
  always_comb begin
    hit_nq  = (n_r >= nq);
    hit_np  = (n >= np);
    hit_all = (n >= N_W'(N_MAX));
    stop    = hit_nq | hit_np | hit_all;
  end
endmodule
