// tb_boldq_accerr: accumulation error of the LUT-based log-to-lin conversion.
//
// Runs 10,016 dot products of length 32 (313 activation vectors through one
// 32 x 32 weight tile) on the full-size array and compares each column sum
// with the exact sum of the LNS products, computed in real arithmetic
// without the 8-bit LUT:  exact = sum_k 2^((mag_a + mag_w)/8 - 7) * signs.
// Reported: the mean relative error for same-sign operands (pure conversion
// error) and, for random signs, the mean error relative to sum_k |product|.
// Both must stay below 0.26 %, the accumulation error reported for this
// conversion with 10,000 vectors of accumulation length 32.
module tb_boldq_accerr;
  import boldq_pkg::*;
  import boldq_ref_pkg::*;

  localparam int R = SA_ROWS, C = SA_COLS, NV = 313;

  logic       clk = 0, rst_n = 0;
  logic       w_load = 0, a_valid = 0;
  lns4_t      w_row [C];
  dual_bias_t w_db  [C];
  wmode_e     w_mode = WM_E0M3;
  lns8_t      a_vec [R];
  logic       out_valid;
  acc_t       out_acc [C];
  int checks = 0, failures = 0;

  boldq_sa dut (.*);

  always #1 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lns4_t wt [R][C];
  lns8_t av [NV][R];
  int    n_out = 0;
  int    pass_signed = 0;
  real   err_sum = 0.0;
  int    n_dot = 0;

  always @(negedge clk) if (rst_n && out_valid) begin
    for (int c = 0; c < C; c++) begin
      real ex, mag_sum, got, e;
      ex = 0.0; mag_sum = 0.0;
      for (int k = 0; k < R; k++) begin
        lns8_t aw;
        real p;
        aw = ref_align(wt[k][c], w_db[c], w_mode);
        if (aw.mag != 0 && av[n_out][k].mag != 0) begin
          p = 2.0 ** ((real'(aw.mag) + real'(av[n_out][k].mag)) / 8.0 - 7.0);
          ex += (aw.s ^ av[n_out][k].s) ? -p : p;
          mag_sum += p;
        end
      end
      got = real'(out_acc[c]) / 16384.0;
      e = got - ex; if (e < 0) e = -e;
      if (mag_sum > 0.0) begin
        err_sum += e / mag_sum;
        n_dot++;
      end
    end
    n_out++;
  end

  task automatic run(input bit signed_ops);
    for (int k = 0; k < R; k++) for (int c = 0; c < C; c++) begin
      wt[k][c] = lns4_t'($urandom_range(1, 7));
      if (signed_ops) wt[k][c][3] = 1'($urandom);
    end
    for (int c = 0; c < C; c++) w_db[c] = dual_bias_t'($urandom);
    @(negedge clk);
    for (int k = R - 1; k >= 0; k--) begin
      for (int c = 0; c < C; c++) w_row[c] = wt[k][c];
      w_load = 1;
      @(negedge clk);
    end
    w_load = 0;
    n_out = 0; err_sum = 0.0; n_dot = 0;
    for (int v = 0; v < NV; v++) begin
      for (int k = 0; k < R; k++) begin
        av[v][k].s   = signed_ops ? 1'($urandom) : 1'b0;
        av[v][k].mag = 7'($urandom_range(1, 95));
        a_vec[k] = av[v][k];
      end
      a_valid = 1;
      @(negedge clk);
    end
    a_valid = 0;
    repeat (R + C + 2) @(negedge clk);
  endtask

  initial begin
    for (int k = 0; k < R; k++) a_vec[k] = '0;
    for (int c = 0; c < C; c++) begin w_row[c] = '0; w_db[c] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      run(s[0]);
      checks++;
      $display("%s operands: %0d dot products of length %0d, mean error %.4f %%",
               s ? "random-sign" : "same-sign", n_dot, R, 100.0 * err_sum / real'(n_dot));
      if (n_dot != NV * C || err_sum / real'(n_dot) > 0.0026) begin
        failures++;
        $display("FAIL accumulation error above 0.26 %% or dot products missing");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
