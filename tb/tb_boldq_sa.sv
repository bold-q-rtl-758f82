// tb_boldq_sa: systolic array with preprocessing row, at a reduced 8 x 6 size.
// Loads a random weight tile with random Dual-Bias per column (one run per
// W_mode), streams random activation vectors with gaps, and checks every
// output vector against the reference dot product
//   sum_k psum(a_k, align(w_kj, db_j)) (32-bit wrap)
// and that it appears exactly ROWS+COLS-1 cycles after its input.
module tb_boldq_sa;
  import boldq_pkg::*;
  import boldq_ref_pkg::*;

  localparam int R = 8, C = 6, NV = 40;

  logic       clk = 0, rst_n = 0;
  logic       w_load = 0, a_valid = 0;
  lns4_t      w_row [C];
  dual_bias_t w_db  [C];
  wmode_e     w_mode = WM_E0M3;
  lns8_t      a_vec [R];
  logic       out_valid;
  acc_t       out_acc [C];
  int checks = 0, failures = 0;

  boldq_sa #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lns4_t      wt [R][C];
  lns8_t      av [NV][R];
  int         in_cycle [NV];
  int         cyc = 0, n_out = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // output checker
  always @(negedge clk) if (rst_n && out_valid) begin
    longint s;
    checks++;
    if (cyc != in_cycle[n_out] + R + C - 1) begin
      failures++;
      $display("FAIL latency vec %0d: in %0d out %0d", n_out, in_cycle[n_out], cyc);
    end
    for (int c = 0; c < C; c++) begin
      s = 0;
      for (int k = 0; k < R; k++) s += ref_psum(av[n_out][k], ref_align(wt[k][c], w_db[c], w_mode));
      checks++;
      if (out_acc[c] != acc_t'(s)) begin
        failures++;
        if (failures < 10) $display("FAIL vec %0d col %0d got %0d exp %0d", n_out, c, out_acc[c], acc_t'(s));
      end
    end
    n_out++;
  end

  initial begin
    for (int i = 0; i < R; i++) a_vec[i] = '0;
    for (int c = 0; c < C; c++) begin w_row[c] = '0; w_db[c] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int pass = 0; pass < 2; pass++) begin
      n_out = 0;
      @(negedge clk);
      w_mode = wmode_e'(pass);
      for (int c = 0; c < C; c++) w_db[c] = dual_bias_t'($urandom);
      for (int k = 0; k < R; k++) for (int c = 0; c < C; c++) wt[k][c] = lns4_t'($urandom);
      // last reduction row first
      for (int k = R - 1; k >= 0; k--) begin
        for (int c = 0; c < C; c++) w_row[c] = wt[k][c];
        w_load = 1;
        @(negedge clk);
      end
      w_load = 0;
      for (int v = 0; v < NV; v++) begin
        for (int k = 0; k < R; k++) begin
          av[v][k] = lns8_t'($urandom);
          if ($urandom_range(0, 9) == 0) av[v][k].mag = 0;
          else av[v][k].mag = 7'($urandom_range(1, 100));
        end
        if ($urandom_range(0, 3) == 0) begin   // idle gap
          a_valid = 0;
          @(negedge clk);
        end
        for (int k = 0; k < R; k++) a_vec[k] = av[v][k];
        a_valid = 1;
        in_cycle[v] = cyc;
        @(negedge clk);
      end
      a_valid = 0;
      repeat (R + C + 4) @(negedge clk);
      checks++;
      if (n_out != NV) begin
        failures++;
        $display("FAIL pass %0d: %0d outputs, expected %0d", pass, n_out, NV);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
