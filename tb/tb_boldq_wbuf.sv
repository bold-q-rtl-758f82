// tb_boldq_wbuf: weight buffer write/read.
// Fills every row and every metadata word with random data, then reads rows
// back in random order checking the one-cycle read latency, and checks the
// combinational per-tile metadata read.
module tb_boldq_wbuf;
  import boldq_pkg::*;

  localparam int ROWS = 32, COLS = 32, TILES = 2, DEPTH = ROWS * TILES;

  logic        clk = 0;
  logic        we = 0, meta_we = 0;
  logic [5:0]  waddr = '0, raddr = '0;
  lns4_t       wdata [COLS];
  logic        meta_tile = 0, rtile = 0;
  logic [4:0]  meta_col = '0;
  blk_meta_t   meta_wdata = '0;
  lns4_t       rdata [COLS];
  blk_meta_t   rmeta [COLS];
  int checks = 0, failures = 0;

  boldq_wbuf #(.ROWS(ROWS), .COLS(COLS), .TILES(TILES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lns4_t     model [DEPTH][COLS];
  blk_meta_t mmodel [TILES][COLS];

  initial begin
    for (int c = 0; c < COLS; c++) wdata[c] = '0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      waddr = 6'(a); we = 1;
      for (int c = 0; c < COLS; c++) begin wdata[c] = lns4_t'($urandom); model[a][c] = wdata[c]; end
      @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < TILES; t++) for (int c = 0; c < COLS; c++) begin
      meta_we = 1; meta_tile = 1'(t); meta_col = 5'(c);
      meta_wdata = blk_meta_t'($urandom); mmodel[t][c] = meta_wdata;
      @(negedge clk);
    end
    meta_we = 0;
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      raddr = 6'(a);
      @(negedge clk);
      raddr = 6'($urandom);      // must not affect the registered data
      #1;
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (rdata[c] != model[a][c]) begin
          failures++;
          if (failures < 10) $display("FAIL row %0d col %0d got %h exp %h", a, c, rdata[c], model[a][c]);
        end
      end
    end
    for (int t = 0; t < TILES; t++) begin
      rtile = 1'(t);
      #1;
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (rmeta[c] != mmodel[t][c]) begin
          failures++;
          $display("FAIL meta tile %0d col %0d got %h exp %h", t, c, rmeta[c], mmodel[t][c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
