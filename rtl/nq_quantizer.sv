// nq_quantizer: quantized n_q generator of the DVFS controller.
//
// From Max. n_m it finds k with 2^(k+1) > Max. n_m >= 2^k, i.e. the position
// of the leading one.  If k is not larger than K the result is clamped to
// k = K, and it is capped at K_MAX = 8 (2^8 = 256, the largest operating point;
// this cap is this design's guard, as n_m never exceeds 441 < 512 only k = 8
// can be capped).  Outputs k and n_q = 2^k.  Max. n_m = 0 gives k = K.
// Combinational.
module nq_quantizer #(
  parameter int N_W   = 9,
  parameter int K     = 4,
  parameter int K_MAX = 8,
  parameter int K_W   = 4
) (
  input  logic [N_W-1:0] max_nm,
  output logic [K_W-1:0] k,
  output logic [N_W-1:0] nq
);
  logic [K_W-1:0] lead;

  always_comb begin
    lead = '0;
    for (int i = 0; i < N_W; i++)
      if (max_nm[i]) lead = K_W'(i);
    if (lead <= K_W'(K))          k = K_W'(K);
    else if (lead >= K_W'(K_MAX)) k = K_W'(K_MAX);
    else                          k = lead;
    nq = N_W'(1) << k;
  end
endmodule
