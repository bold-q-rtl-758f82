// tb_boldq_top: end-to-end test of the accelerator at its default size
// (32 x 32 array, 32-element blocks, buffers of 2 weight tiles and 64 vectors).
//
// Loads two weight tiles (one with static LNS4_E0M3 Dual-Bias, one with
// dynamic LNS4_E2M2 Dual-Bias) and 64 activation vectors with scale factors
// through the host ports, then runs three operations:
//   op 0: tile 0, W_mode E0M3, 8-bit re-quantization, vectors 0..23
//   op 1: tile 1, W_mode E2M2, 4-bit re-quantization with ADBQ, vectors 24..55
//   op 2: tile 0, W_mode E0M3, 4-bit re-quantization, vectors 56..63
//   op 3: the 4-bit path of attention. The 32 4-bit result blocks of op 1,
//         with the Dual-Bias and scale ADBQ computed for them, are read from
//         the quant buffer and written back as tile 1 (block j becomes column
//         j, as a K-cache block would), then multiplied with vectors 0..23
//         using W_mode E2M2 and 8-bit re-quantization.
// For every output element the exact result is computed independently:
//   x = sum_k w_kj * a_k * s_w(j) * s_a, with w and a decoded to real values,
// and the quantized code read back from the quant buffer must be the right
// one up to the hardware's approximations: the encoder's error, the 0.3 %
// LUT rounding of each product (large relative to a sum whose products
// cancel) and the rounding of the scaled log to 1/8 before the bin choice. The cycle count
// from start to done is checked against ROWS + n + ROWS + COLS + 4.
// Mechanisms counted (each must occur): weight loads, both bias encodings,
// both quantization modes, non-zero Bias and Sub-Bias from ADBQ, top-bin
// codes, zero outputs, negative outputs and the reuse of 4-bit results.
module tb_boldq_top;
  import boldq_pkg::*;
  import boldq_ref_pkg::*;

  localparam int ROWS = SA_ROWS, COLS = SA_COLS, ADEPTH = 64, QDEPTH = 64;

  logic       clk = 0, rst_n = 0;
  logic       wb_we = 0, wb_meta_we = 0;
  logic [5:0] wb_waddr = '0;
  lns4_t      wb_wdata [COLS];
  logic       wb_meta_tile = 0;
  logic [4:0] wb_meta_col = '0;
  blk_meta_t  wb_meta_wdata = '0;
  logic       ab_we = 0;
  logic [5:0] ab_waddr = '0;
  lns8_t      ab_wdata [ROWS];
  blk_meta_t  ab_wmeta = '0;
  logic [5:0] qb_raddr = '0;
  logic [7:0] qb_rdata [COLS];
  blk_meta_t  qb_rmeta;
  logic       start = 0;
  logic       cfg_tile = 0;
  logic [5:0] cfg_a_base = '0;
  logic [6:0] cfg_n_vec = '0;
  logic [5:0] cfg_q_base = '0;
  wmode_e     cfg_w_mode = WM_E0M3;
  qmode_e     cfg_q_mode = QM_A8;
  logic       busy, done;

  int checks = 0, failures = 0;
  int n_load = 0, n_e0m3 = 0, n_e2m2 = 0, n_a8 = 0, n_a4 = 0;
  int n_bias = 0, n_sub = 0, n_topbin = 0, n_zero = 0, n_neg = 0, n_kv = 0;

  boldq_top dut (.*);

  always #1 clk = ~clk;

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus
  lns4_t      wt  [2][ROWS][COLS];
  blk_meta_t  wm  [2][COLS];
  lns8_t      av  [ADEPTH][ROWS];
  blk_meta_t  am  [ADEPTH];

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("FAIL %s", msg);
  endtask

  // Real value of the exact result (log2 of magnitude and sign).
  function automatic real exact_val(input int t, input wmode_e wmd, input int v, input int c,
                                    output real sabs);
    real s, sc;
    s = 0.0;
    sabs = 0.0;
    for (int k = 0; k < ROWS; k++) begin
      lns8_t aw;
      aw = ref_align(wt[t][k][c], wm[t][c].db, wmd);
      if (aw.mag != 0 && av[v][k].mag != 0) begin
        real p;
        p = 2.0 ** ((real'(aw.mag) - 24.0) / 8.0 + (real'(av[v][k].mag) - 32.0) / 8.0);
        s += (aw.s ^ av[v][k].s) ? -p : p;
        sabs += p;
      end
    end
    sc = 2.0 ** (real'(wm[t][c].sf) / 8.0 - 16.0) * 2.0 ** (real'(am[v].sf) / 8.0 - 16.0);
    sabs *= sc;
    return s * sc;
  endfunction

  task automatic run_op(input int t, input wmode_e wmd, input qmode_e qmd,
                        input int a_base, input int n, input int q_base);
    int t0, lat;
    @(negedge clk);
    cfg_tile = 1'(t); cfg_w_mode = wmd; cfg_q_mode = qmd;
    cfg_a_base = 6'(a_base); cfg_n_vec = 7'(n); cfg_q_base = 6'(q_base);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    n_load++;
    if (wmd == WM_E0M3) n_e0m3++; else n_e2m2++;
    if (qmd == QM_A8) n_a8++; else n_a4++;
    checks++;
    if (lat != ROWS + n + ROWS + COLS + 4) fail($sformatf("op latency %0d, expected %0d", lat, ROWS + n + ROWS + COLS + 4));
    // read back and check every result block
    for (int i = 0; i < n; i++) begin
      real x [COLS];
      real lx [COLS];
      real sl [COLS];   // allowed log2 error
      real top, l1;
      int  sfx;
      qb_raddr = 6'(q_base + i);
      @(negedge clk);
      top = 0.0;
      for (int c = 0; c < COLS; c++) begin
        real sa;
        x[c] = exact_val(t, wmd, a_base + i, c, sa);
        lx[c] = (x[c] != 0.0) ? log2r(x[c] < 0 ? -x[c] : x[c]) : -1000.0;
        // encoder error plus the PE LUT rounding (0.3 % of each product),
        // which grows relative to the sum when products cancel
        sl[c] = (x[c] != 0.0) ? 0.02 + log2r(1.0 + 0.004 * sa / (x[c] < 0 ? -x[c] : x[c])) : 1000.0;
        if ((x[c] < 0 ? -x[c] : x[c]) > top) top = (x[c] < 0 ? -x[c] : x[c]);
      end
      l1 = log2r(top);
      if (qmd == QM_A4) begin
        if (qb_rmeta.db.bias != 0) n_bias++;
        if (qb_rmeta.db.sub != 0) n_sub++;
        sfx = $rtoi($ceil((l1 - 1.5 - real'(qb_rmeta.db.sub) / 4.0 - real'(qb_rmeta.db.bias) / 4.0) * 8.0)) + 128;
      end else begin
        sfx = $rtoi($ceil((l1 - 7.875) * 8.0)) + 128;
        checks++;
        if (qb_rmeta.db != 0) fail("8-bit block carries a Dual-Bias");
      end
      checks++;
      if (sfx - int'(qb_rmeta.sf) > 1 || int'(qb_rmeta.sf) - sfx > 1)
        fail($sformatf("op t=%0d vec %0d scale factor %0d, expected %0d", t, i, qb_rmeta.sf, sfx));
      for (int c = 0; c < COLS; c++) begin
        real y, ly, bv [8], dmin, dsel;
        logic [7:0] q;
        q = qb_rdata[c];
        ly = lx[c] - (real'(qb_rmeta.sf) / 8.0 - 16.0);   // log2 of the scaled value
        checks++;
        if (q == 0) n_zero++;
        if (qmd == QM_A8) begin
          if (q[6:0] == 0) begin
            if (ly > -3.875 + sl[c] + 0.0625) fail($sformatf("A8 vec %0d col %0d zero, log %f", i, c, ly));
          end else begin
            y = (real'(q[6:0]) - 32.0) / 8.0;
            if ((q[7] != (x[c] < 0)) || (q[6:0] != 127 && (y - ly > 0.0625 + sl[c] || ly - y > 0.0625 + sl[c])))
              fail($sformatf("A8 vec %0d col %0d code %h (%f) exact %f", i, c, q, y, ly));
            if (q[7]) n_neg++;
          end
        end else begin
          for (int b = 1; b <= 5; b++) bv[b] = (real'(b) - 4.0) / 2.0;
          bv[6] = 1.0 + real'(qb_rmeta.db.sub) / 4.0;
          bv[7] = 1.5 + real'(qb_rmeta.db.sub) / 4.0 + real'(qb_rmeta.db.bias) / 4.0;
          if (q[7:4] != 0) fail("A4 code uses the upper nibble");
          if (q[2:0] == 0) begin
            if (ly > -2.5 + sl[c] + 0.0625) fail($sformatf("A4 vec %0d col %0d zero but log %f", i, c, ly));
          end else begin
            if (q[2:0] == 7) n_topbin++;
            dmin = 1000.0;
            for (int b = 1; b <= 7; b++) begin
              real d;
              d = ly - bv[b]; if (d < 0) d = -d;
              if (d < dmin) dmin = d;
            end
            dsel = ly - bv[q[2:0]]; if (dsel < 0) dsel = -dsel;
            if (dsel > dmin + 2.0 * sl[c] + 0.125 || ly < -2.5 - sl[c] - 0.0625 || q[3] != (x[c] < 0))
              fail($sformatf("A4 vec %0d col %0d code %h, log %f, bin %f", i, c, q, ly, bv[q[2:0]]));
          end
        end
      end
    end
  endtask

  initial begin
    for (int c = 0; c < COLS; c++) wb_wdata[c] = '0;
    for (int r = 0; r < ROWS; r++) ab_wdata[r] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // weight tiles and their per-column metadata
    for (int t = 0; t < 2; t++) begin
      for (int k = 0; k < ROWS; k++) begin
        wb_waddr = 6'(t * ROWS + k); wb_we = 1;
        for (int c = 0; c < COLS; c++) begin
          wt[t][k][c] = lns4_t'($urandom);
          wb_wdata[c] = wt[t][k][c];
        end
        @(negedge clk);
      end
      wb_we = 0;
      for (int c = 0; c < COLS; c++) begin
        wm[t][c].db = dual_bias_t'($urandom);
        if (t == 1) wm[t][c].db = '{bias: 4'($urandom_range(0, 6)), sub: 4'($urandom_range(0, 6))};
        wm[t][c].sf = sf_t'($urandom_range(110, 140));
        wb_meta_we = 1; wb_meta_tile = 1'(t); wb_meta_col = 5'(c); wb_meta_wdata = wm[t][c];
        @(negedge clk);
      end
      wb_meta_we = 0;
    end
    // activation vectors; a few carry one outlier
    for (int v = 0; v < ADEPTH; v++) begin
      for (int r = 0; r < ROWS; r++) begin
        av[v][r].s = 1'($urandom);
        av[v][r].mag = ($urandom_range(0, 9) == 0) ? 7'd0 : 7'($urandom_range(20, 70));
      end
      if (v % 3 == 0) av[v][$urandom_range(0, ROWS - 1)].mag = 7'($urandom_range(90, 120));
      am[v] = '{db: '0, sf: sf_t'($urandom_range(100, 150))};
      ab_waddr = 6'(v); ab_we = 1; ab_wmeta = am[v];
      for (int r = 0; r < ROWS; r++) ab_wdata[r] = av[v][r];
      @(negedge clk);
    end
    ab_we = 0;

    run_op(0, WM_E0M3, QM_A8, 0, 24, 0);
    run_op(1, WM_E2M2, QM_A4, 24, 32, 24);
    run_op(0, WM_E0M3, QM_A4, 56, 8, 56);

    // 4-bit blocks with run-time Dual-Bias become the stationary operand
    for (int j = 0; j < COLS; j++) begin
      qb_raddr = 6'(24 + j);
      @(negedge clk);
      for (int k = 0; k < ROWS; k++) wt[1][k][j] = lns4_t'(qb_rdata[k][3:0]);
      wm[1][j] = qb_rmeta;
    end
    for (int k = 0; k < ROWS; k++) begin
      wb_waddr = 6'(ROWS + k); wb_we = 1;
      for (int c = 0; c < COLS; c++) wb_wdata[c] = wt[1][k][c];
      @(negedge clk);
    end
    wb_we = 0;
    for (int c = 0; c < COLS; c++) begin
      wb_meta_we = 1; wb_meta_tile = 1'b1; wb_meta_col = 5'(c); wb_meta_wdata = wm[1][c];
      @(negedge clk);
    end
    wb_meta_we = 0;
    // the reused blocks carry large scale factors; the query vectors get
    // smaller ones so the products stay inside the LNS16 range
    for (int v = 0; v < 24; v++) begin
      am[v].sf = sf_t'(int'(am[v].sf) - 100);
      ab_waddr = 6'(v); ab_we = 1; ab_wmeta = am[v];
      for (int r = 0; r < ROWS; r++) ab_wdata[r] = av[v][r];
      @(negedge clk);
    end
    ab_we = 0;
    n_kv++;
    run_op(1, WM_E2M2, QM_A8, 0, 24, 0);

    $display("ops %0d (E0M3 %0d, E2M2 %0d; A8 %0d, A4 %0d); 4-bit results reused as stationary tile %0d; blocks with Bias %0d, Sub-Bias %0d; top-bin codes %0d, zeros %0d, negative %0d",
             n_load, n_e0m3, n_e2m2, n_a8, n_a4, n_kv, n_bias, n_sub, n_topbin, n_zero, n_neg);
    checks++;
    if (n_e0m3 == 0 || n_e2m2 == 0 || n_a8 == 0 || n_a4 == 0 || n_bias == 0 || n_sub == 0 ||
        n_topbin == 0 || n_zero == 0 || n_neg == 0 || n_kv == 0)
      fail("a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
