// boldq_wbuf: weight buffer.
//
// Holds TILES weight tiles of ROWS x COLS 4-bit LNS4_E2M1 codes, stored one
// reduction row (COLS codes) per word, and for every tile and column the
// block metadata produced offline by the Dual-Bias search: Dual-Bias (8 bits)
// and LNS8_E5M3 scale factor (8 bits). A column of a tile is one 32-element
// weight block, so one metadata word per column and tile.
//
// Ports: a host write port for rows (we/waddr/wdata) and one for metadata
// (meta_we/meta_tile/meta_col/meta_wdata); a synchronous row read port
// (raddr in cycle t, rdata in t+1) that feeds the preprocessing row; and a
// combinational metadata read of a whole tile (rmeta, COLS words).
// The capacity (TILES) is this design's choice.
module boldq_wbuf
  import boldq_pkg::*;
#(
  parameter int ROWS  = SA_ROWS,
  parameter int COLS  = SA_COLS,
  parameter int TILES = 2,
  localparam int DEPTH = TILES * ROWS,
  localparam int AW    = $clog2(DEPTH),
  localparam int TW    = (TILES > 1) ? $clog2(TILES) : 1,
  localparam int CW    = $clog2(COLS)
) (
  input  logic        clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  lns4_t         wdata [COLS],
  input  logic          meta_we,
  input  logic [TW-1:0] meta_tile,
  input  logic [CW-1:0] meta_col,
  input  blk_meta_t     meta_wdata,
  input  logic [AW-1:0] raddr,
  output lns4_t         rdata [COLS],
  input  logic [TW-1:0] rtile,
  output blk_meta_t     rmeta [COLS]
);

  logic [4*COLS-1:0] mem  [DEPTH];
  blk_meta_t         meta [TILES][COLS];
  logic [4*COLS-1:0] rword;

  always_ff @(posedge clk) begin
    if (we) begin
      for (int c = 0; c < COLS; c++) mem[waddr][4*c +: 4] <= wdata[c];
    end
    rword <= mem[raddr];
  end

  always_ff @(posedge clk) begin
    if (meta_we) meta[meta_tile][meta_col] <= meta_wdata;
  end

  always_comb begin
    for (int c = 0; c < COLS; c++) begin
      rdata[c] = rword[4*c +: 4];
      rmeta[c] = meta[rtile][c];
    end
  end

endmodule
