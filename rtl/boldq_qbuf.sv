// boldq_qbuf: quant buffer.
//
// Collects what the quantization module produces for the next layer: per
// block, COLS 8-bit OAct codes (LNS8_E4M3, or LNS4_E2M1 in the low nibble)
// plus the block's Dual-Bias and LNS8_E5M3 scale factor. Written by the
// quantization module (we/waddr/wdata/wmeta), read synchronously by the host
// or the next layer (raddr in cycle t, rdata/rmeta in t+1). Depth is this
// design's choice.
module boldq_qbuf
  import boldq_pkg::*;
#(
  parameter int COLS  = SA_COLS,
  parameter int DEPTH = 64,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [7:0]    wdata [COLS],
  input  blk_meta_t     wmeta,
  input  logic [AW-1:0] raddr,
  output logic [7:0]    rdata [COLS],
  output blk_meta_t     rmeta
);

  logic [8*COLS+15:0] mem [DEPTH];
  logic [8*COLS+15:0] rword;

  always_ff @(posedge clk) begin
    if (we) begin
      for (int c = 0; c < COLS; c++) mem[waddr][8*c +: 8] <= wdata[c];
      mem[waddr][8*COLS +: 16] <= wmeta;
    end
    rword <= mem[raddr];
  end

  always_comb begin
    for (int c = 0; c < COLS; c++) rdata[c] = rword[8*c +: 8];
    rmeta = rword[8*COLS +: 16];
  end

endmodule
