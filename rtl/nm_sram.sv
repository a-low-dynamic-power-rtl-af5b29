// nm_sram: n_m memory of the DVFS controller.
//
// Holds the n_m found for every M-Blk position of the picture (396 for CIF).
// Because M-Blks are processed in raster order, the entry of the M-Blk being
// coded still holds the value of the reference frame, while the entries of its
// top, left and upper-left neighbours already hold values of the current
// frame; one array therefore serves both frames.  Single-port, synchronous:
// a write takes effect on the clock edge with we; a read returns rdata on the
// edge after the address.  No reset: the controller clears it after reset.
// The organisation (one single-port array) is this design's own choice.
module nm_sram #(
  parameter int DEPTH = 396,
  parameter int W     = 9,
  parameter int A_W   = $clog2(DEPTH)
) (
  input  logic           clk,
  input  logic           we,
  input  logic [A_W-1:0] addr,
  input  logic [W-1:0]   wdata,
  output logic [W-1:0]   rdata
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end
endmodule
