// tb_boldq_adbq: adaptive Dual-Bias computation for 32-element blocks.
// Random blocks, many with planted top-1/top-2/top-3 gaps around the 0.5
// threshold and beyond the largest bias, in both target modes. Dual-Bias,
// scale factor and top-3 magnitudes are compared with a reference that sorts
// the block and applies Bias = max(RTN(d12-0.5),0), Sub-Bias = max(RTN(d23-0.5),0)
// on the LNS4_E2M2 grid in real arithmetic. Counts blocks whose Bias and
// Sub-Bias come out zero and non-zero; each kind must occur.
module tb_boldq_adbq;
  import boldq_pkg::*;
  import boldq_ref_pkg::*;

  localparam int N = BLK;

  lns16_t      vec [N];
  qmode_e      mode;
  logic [14:0] top1, top2, top3;
  dual_bias_t  db, exdb;
  sf_t         sf, exsf;
  int checks = 0, failures = 0;
  int n_bias = 0, n_sub = 0, n_nobias = 0, n_clamp = 0;

  boldq_adbq #(.N(N)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lns16_t dv [];
    int sorted [$];
    dv = new[N];
    for (int t = 0; t < 3000; t++) begin
      int base;
      mode = qmode_e'(t % 2);
      base = $urandom_range(4000, 24000);
      for (int i = 0; i < N; i++) begin
        vec[i].s   = 1'($urandom);
        vec[i].mag = 15'($urandom_range(0, base));
      end
      if (t % 3 != 0) begin
        int p1, p2, p3;
        p1 = $urandom_range(0, N - 1);
        p2 = (p1 + 1 + $urandom_range(0, N - 3)) % N;
        p3 = p2;
        while (p3 == p1 || p3 == p2) p3 = $urandom_range(0, N - 1);
        vec[p3].mag = 15'(base + $urandom_range(0, 1200));
        vec[p2].mag = 15'(vec[p3].mag + $urandom_range(0, 2500));
        vec[p1].mag = 15'(vec[p2].mag + $urandom_range(0, (t % 7 == 0) ? 6000 : 2500));
      end
      // results near the top of the LNS16 range (saturated dequant outputs)
      if (t % 50 == 1) vec[$urandom_range(0, N - 1)].mag = 15'($urandom_range(32600, 32767));
      #1;
      for (int i = 0; i < N; i++) dv[i] = vec[i];
      ref_adbq(dv, mode, exdb, exsf);
      sorted.delete();
      for (int i = 0; i < N; i++) sorted.push_back(int'(vec[i].mag));
      sorted.rsort();
      checks++;
      if (db != exdb || sf != exsf || int'(top1) != sorted[0] || int'(top2) != sorted[1] ||
          int'(top3) != sorted[2]) begin
        failures++;
        if (failures < 10)
          $display("FAIL t=%0d mode=%0d top %0d %0d %0d (exp %0d %0d %0d) db %h exp %h sf %0d exp %0d",
                   t, mode, top1, top2, top3, sorted[0], sorted[1], sorted[2], db, exdb, sf, exsf);
      end
      if (mode == QM_A4) begin
        if (exdb.bias != 0) n_bias++;
        if (exdb.sub != 0) n_sub++;
        if (exdb.bias == 0 && exdb.sub == 0) n_nobias++;
        if (exdb.bias == 15) n_clamp++;
      end
    end
    checks++;
    if (n_bias == 0 || n_sub == 0 || n_nobias == 0 || n_clamp == 0) begin
      failures++;
      $display("FAIL coverage: bias %0d sub %0d none %0d clamp %0d", n_bias, n_sub, n_nobias, n_clamp);
    end
    $display("blocks with Bias %0d, Sub-Bias %0d, neither %0d, clamped %0d", n_bias, n_sub, n_nobias, n_clamp);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
