// boldq_abuf: activation buffer.
//
// Holds DEPTH activation vectors of ROWS LNS8_E4M3 values; each vector is one
// 32-element block along the reduction dimension, stored with its block
// metadata (Dual-Bias and LNS8_E5M3 scale factor) from the quantization step.
//
// Ports: host write of a vector and its metadata (we/waddr/wdata/wmeta); a
// synchronous vector read port (raddr in cycle t, rdata in t+1) streaming into
// the array; a combinational metadata read port (maddr/rmeta) used when the
// vector's results leave the array. The depth is this design's choice.
module boldq_abuf
  import boldq_pkg::*;
#(
  parameter int ROWS  = SA_ROWS,
  parameter int DEPTH = 64,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  lns8_t         wdata [ROWS],
  input  blk_meta_t     wmeta,
  input  logic [AW-1:0] raddr,
  output lns8_t         rdata [ROWS],
  input  logic [AW-1:0] maddr,
  output blk_meta_t     rmeta
);

  logic [8*ROWS-1:0] mem  [DEPTH];
  blk_meta_t         meta [DEPTH];
  logic [8*ROWS-1:0] rword;

  always_ff @(posedge clk) begin
    if (we) begin
      for (int r = 0; r < ROWS; r++) mem[waddr][8*r +: 8] <= wdata[r];
      meta[waddr] <= wmeta;
    end
    rword <= mem[raddr];
  end

  always_comb begin
    for (int r = 0; r < ROWS; r++) rdata[r] = rword[8*r +: 8];
  end
  assign rmeta = meta[maddr];

endmodule
