// tb_boldq_dequant: dequantization by scale-factor addition.
// Random encoder outputs and weight/activation scale factors; the result must
// equal 1024*(log2 + 16) of the dequantized value computed in real arithmetic
// from the format definitions, with underflow to zero and saturation.
module tb_boldq_dequant;
  import boldq_pkg::*;
  import boldq_ref_pkg::*;

  lns16_t in, out, ex;
  sf_t    sf_w, sf_a;
  int checks = 0, failures = 0;
  int n_zero = 0, n_sat = 0;

  boldq_dequant dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 20000; i++) begin
      in   = lns16_t'($urandom);
      if (i % 50 == 0) in.mag = 0;
      sf_w = sf_t'($urandom);
      sf_a = sf_t'($urandom);
      #1;
      ex = ref_dequant(in, sf_w, sf_a);
      if (ex.mag == 0) n_zero++;
      if (ex.mag == 15'h7fff) n_sat++;
      checks++;
      if (out != ex) begin
        failures++;
        if (failures < 10) $display("FAIL in=%h sfw=%0d sfa=%0d got %h exp %h", in, sf_w, sf_a, out, ex);
      end
    end
    checks++;
    if (n_zero == 0 || n_sat == 0) begin
      failures++;
      $display("FAIL corner cases not reached: zero %0d sat %0d", n_zero, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
