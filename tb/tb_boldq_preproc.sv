// tb_boldq_preproc: exhaustive check of the Dual-Bias preprocessing unit.
// Every weight code, Bias, Sub-Bias and W_mode combination is applied and the
// aligned LNS8 magnitude is compared with a reference computed in real
// arithmetic from the format definitions: log2|w| = (code-4)/2, plus
// Sub-Bias+Bias on the top bin and Sub-Bias on the second bin, with biases
// decoded as sign+m/8 (LNS4_E0M3) or b/4 (LNS4_E2M2); expected mag = 8*log2+24,
// saturated at 127.
module tb_boldq_preproc;
  import boldq_pkg::*;

  lns4_t      w;
  logic [3:0] bias, sub_bias;
  wmode_e     w_mode;
  lns8_t      aligned_w;
  int checks = 0, failures = 0;

  boldq_preproc dut (.*);

  function automatic real bval(input logic [3:0] b, input wmode_e m);
    if (m == WM_E0M3) return (b[3] ? -1.0 : 1.0) * real'(b[2:0]) / 8.0;
    return real'(b) / 4.0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < 2; m++)
      for (int wi = 0; wi < 16; wi++)
        for (int bi = 0; bi < 16; bi++)
          for (int si = 0; si < 16; si++) begin
            real y;
            int  exp_mag;
            w = 4'(wi); bias = 4'(bi); sub_bias = 4'(si); w_mode = wmode_e'(m);
            #1;
            y = (real'(wi % 8) - 4.0) / 2.0;
            if (wi % 8 == 7) y += bval(4'(si), wmode_e'(m)) + bval(4'(bi), wmode_e'(m));
            if (wi % 8 == 6) y += bval(4'(si), wmode_e'(m));
            exp_mag = $rtoi(y * 8.0 + 24.5);
            if (exp_mag > 127) exp_mag = 127;   // field saturates
            checks++;
            if (wi % 8 == 0) begin
              if (aligned_w !== 8'h00) begin
                failures++;
                $display("FAIL zero code w=%h got %h", w, aligned_w);
              end
            end else if (aligned_w.mag != 7'(exp_mag) || aligned_w.s != w[3]) begin
              failures++;
              if (failures < 10)
                $display("FAIL w=%h b=%h s=%h mode=%0d got s=%b mag=%0d exp mag=%0d",
                         w, bias, sub_bias, m, aligned_w.s, aligned_w.mag, exp_mag);
            end
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
