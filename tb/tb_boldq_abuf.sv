// tb_boldq_abuf: activation buffer write/read.
// Writes random vectors and metadata to every address, then checks random
// synchronous vector reads (one-cycle latency) and combinational metadata
// reads from the second port in the same cycles.
module tb_boldq_abuf;
  import boldq_pkg::*;

  localparam int ROWS = 32, DEPTH = 64;

  logic       clk = 0, we = 0;
  logic [5:0] waddr = '0, raddr = '0, maddr = '0;
  lns8_t      wdata [ROWS];
  blk_meta_t  wmeta = '0;
  lns8_t      rdata [ROWS];
  blk_meta_t  rmeta;
  int checks = 0, failures = 0;

  boldq_abuf #(.ROWS(ROWS), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lns8_t     model [DEPTH][ROWS];
  blk_meta_t mmodel [DEPTH];

  initial begin
    for (int r = 0; r < ROWS; r++) wdata[r] = '0;
    @(negedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      waddr = 6'(a); we = 1;
      for (int r = 0; r < ROWS; r++) begin wdata[r] = lns8_t'($urandom); model[a][r] = wdata[r]; end
      wmeta = blk_meta_t'($urandom); mmodel[a] = wmeta;
      @(negedge clk);
    end
    we = 0;
    for (int i = 0; i < 200; i++) begin
      int a, m;
      a = $urandom_range(0, DEPTH - 1);
      m = $urandom_range(0, DEPTH - 1);
      raddr = 6'(a); maddr = 6'(m);
      #1;
      checks++;
      if (rmeta != mmodel[m]) begin
        failures++;
        $display("FAIL meta %0d got %h exp %h", m, rmeta, mmodel[m]);
      end
      @(negedge clk);
      raddr = 6'($urandom);
      #1;
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if (rdata[r] != model[a][r]) begin
          failures++;
          if (failures < 10) $display("FAIL vec %0d el %0d got %h exp %h", a, r, rdata[r], model[a][r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
