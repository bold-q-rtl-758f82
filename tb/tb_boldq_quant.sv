// tb_boldq_quant: quantization module (ADBQ + re-quantization), one cycle latency.
// Random 32-element LNS16 blocks with planted outliers, alternating 8-bit and
// 4-bit targets, some cycles without in_valid. Every output element, the
// Dual-Bias and the scale factor are compared with the reference model
// (sorting-based ADBQ, nearest-bin search in real arithmetic), and each result
// must appear exactly one cycle after its input.
module tb_boldq_quant;
  import boldq_pkg::*;
  import boldq_ref_pkg::*;

  localparam int N = BLK;

  logic       clk = 0, rst_n = 0, in_valid = 0;
  qmode_e     mode = QM_A8;
  lns16_t     dq_act [N];
  logic       out_valid;
  logic [7:0] oact [N];
  dual_bias_t db;
  sf_t        sf;
  int checks = 0, failures = 0;
  int n_top_bin = 0, n_zero = 0;

  boldq_quant #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lns16_t     dv [];
    dual_bias_t exdb;
    sf_t        exsf;
    logic [7:0] exq;
    logic       was_valid;
    qmode_e     m_prev;
    dv = new[N];
    for (int i = 0; i < N; i++) dq_act[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      int base;
      @(negedge clk);
      base = $urandom_range(2000, 26000);
      for (int i = 0; i < N; i++) begin
        dq_act[i].s   = 1'($urandom);
        dq_act[i].mag = ($urandom_range(0, 15) == 0) ? 15'd0 : 15'($urandom_range(base - 2000, base));
      end
      if (t % 2 == 0) begin
        dq_act[$urandom_range(0, N-1)].mag = 15'(base + $urandom_range(0, 3000));
        dq_act[$urandom_range(0, N-1)].mag = 15'(base + $urandom_range(0, 5000));
      end
      mode = qmode_e'((t / 3) % 2);
      in_valid = ($urandom_range(0, 4) != 0);
      for (int i = 0; i < N; i++) dv[i] = dq_act[i];
      ref_adbq(dv, mode, exdb, exsf);
      was_valid = in_valid;
      m_prev = mode;
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid != was_valid) begin
        failures++;
        $display("FAIL out_valid %b exp %b", out_valid, was_valid);
      end
      if (was_valid) begin
        checks++;
        if (db != exdb || sf != exsf) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d db %h exp %h sf %0d exp %0d", t, db, exdb, sf, exsf);
        end
        for (int i = 0; i < N; i++) begin
          exq = ref_requant(dv[i], m_prev, exdb, exsf);
          if (m_prev == QM_A4 && exq[2:0] == 3'd7) n_top_bin++;
          if (exq == 0) n_zero++;
          checks++;
          if (oact[i] != exq) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d mode %0d el %0d mag %0d got %h exp %h", t, m_prev, i, dv[i].mag, oact[i], exq);
          end
        end
      end
    end
    checks++;
    if (n_top_bin == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL coverage top bin %0d zero %0d", n_top_bin, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
