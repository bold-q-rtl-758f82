// tb_boldq_qbuf: quant buffer write/read.
// Writes random result blocks with metadata, overwrites some, then checks
// random synchronous reads (one-cycle latency) of data and metadata.
module tb_boldq_qbuf;
  import boldq_pkg::*;

  localparam int COLS = 32, DEPTH = 64;

  logic       clk = 0, we = 0;
  logic [5:0] waddr = '0, raddr = '0;
  logic [7:0] wdata [COLS];
  blk_meta_t  wmeta = '0;
  logic [7:0] rdata [COLS];
  blk_meta_t  rmeta;
  int checks = 0, failures = 0;

  boldq_qbuf #(.COLS(COLS), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [7:0] model [DEPTH][COLS];
  blk_meta_t  mmodel [DEPTH];

  initial begin
    for (int c = 0; c < COLS; c++) wdata[c] = '0;
    @(negedge clk);
    for (int i = 0; i < DEPTH + 40; i++) begin
      int a;
      a = (i < DEPTH) ? i : $urandom_range(0, DEPTH - 1);
      waddr = 6'(a); we = 1;
      for (int c = 0; c < COLS; c++) begin wdata[c] = 8'($urandom); model[a][c] = wdata[c]; end
      wmeta = blk_meta_t'($urandom); mmodel[a] = wmeta;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(0, DEPTH - 1);
      raddr = 6'(a);
      @(negedge clk);
      raddr = 6'($urandom);
      #1;
      checks++;
      if (rmeta != mmodel[a]) begin
        failures++;
        $display("FAIL meta %0d got %h exp %h", a, rmeta, mmodel[a]);
      end
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (rdata[c] != model[a][c]) begin
          failures++;
          if (failures < 10) $display("FAIL %0d el %0d got %h exp %h", a, c, rdata[c], model[a][c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
