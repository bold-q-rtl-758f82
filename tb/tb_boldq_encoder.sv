// tb_boldq_encoder: lin-to-log encoder against log2 in real arithmetic.
// Random column sums spread over all magnitudes (both signs), powers of two
// and the extreme values; the LNS16 magnitude must be within 10/1024 of
// 1024*log2|acc|, the sign must follow acc, and 0 and +-1 must encode as zero.
module tb_boldq_encoder;
  import boldq_pkg::*;
  import boldq_ref_pkg::*;

  acc_t   acc;
  lns16_t enc;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  boldq_encoder dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input acc_t v);
    real ex, err;
    acc = v;
    #1;
    checks++;
    if (v == 0 || v == 1 || v == -1) begin
      if (enc.mag != 0) begin
        failures++;
        $display("FAIL %0d should encode as zero, got %0d", v, enc.mag);
      end
      return;
    end
    ex  = ref_log1024(v);
    err = real'(enc.mag) - ex;
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    if (err > 10.0 || enc.s != (v < 0)) begin
      failures++;
      if (failures < 10) $display("FAIL acc=%0d got s=%b mag=%0d exp %f", v, enc.s, enc.mag, ex);
    end
  endtask

  initial begin
    one(0); one(1); one(-1); one(32'sh7fffffff); one(-32'sh7fffffff); one(32'sh80000000);
    for (int k = 1; k < 31; k++) begin one(acc_t'(1) <<< k); one(-(acc_t'(1) <<< k)); end
    for (int i = 0; i < 20000; i++) begin
      int sh;
      acc_t v;
      sh = $urandom_range(0, 30);
      v = acc_t'($urandom) >>> sh;
      one(v);
    end
    $display("max error %f / 1024", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
