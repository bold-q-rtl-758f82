// tb_boldq_pe: self-checking test of one LNS-MAC PE.
// Loads a stationary weight, then applies random activations and incoming
// partial sums and checks, one cycle later, that
//   acc_out = acc_in +/- round(128 * 2^(m/8)) * 2^e,  {e, m} = mag_a + mag_w,
// evaluated with real arithmetic (pow), including zero operands, signs and
// the saturation of very large products. Also checks the one-cycle
// activation forwarding and that weights shift down only while w_load is high.
module tb_boldq_pe;
  import boldq_pkg::*;

  logic  clk = 0, rst_n = 0, w_load = 0;
  lns8_t w_in = '0, w_out, a_in = '0, a_out;
  acc_t  acc_in = '0, acc_out;
  int checks = 0, failures = 0;

  boldq_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_psum(input lns8_t a, input lns8_t w);
    int p, e, m;
    longint mag;
    if (a.mag == 0 || w.mag == 0) return 0;
    p = int'(a.mag) + int'(w.mag);
    e = p / 8; m = p % 8;
    mag = longint'($rtoi(128.0 * (2.0 ** (real'(m) / 8.0)) + 0.5)) << e;
    if (mag > 64'h7fff_ffff) mag = 64'h7fff_ffff;
    return (a.s ^ w.s) ? -mag : mag;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    lns8_t  wt, wt2;
    lns8_t  a;
    acc_t   ai;
    longint expv;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      // load a weight
      wt = lns8_t'($urandom);
      if (trial % 10 == 3) wt.mag = 0;
      @(negedge clk);
      w_in = wt; w_load = 1;
      @(negedge clk);
      w_load = 0;
      check("w_out after load", longint'(w_out), longint'(wt));
      // a different w_in must not disturb the stationary weight
      wt2 = lns8_t'($urandom);
      w_in = wt2;
      for (int k = 0; k < 50; k++) begin
        a = lns8_t'($urandom);
        if (k % 7 == 0) a.mag = 0;
        if (k % 5 == 0) a.mag = 7'($urandom_range(0, 60));  // moderate range
        if (trial % 4 != 0) begin
          a.mag = 7'($urandom_range(1, 90));
          wt.mag = wt.mag;
        end
        ai = acc_t'($urandom_range(0, 1 << 20)) - acc_t'(1 << 19);
        a_in = a; acc_in = ai;
        @(negedge clk);
        expv = longint'(ai) + ref_psum(a, wt);
        check("acc_out", longint'(acc_out), longint'(acc_t'(expv)));
        check("a_out", longint'(a_out), longint'(a));
        check("w_out hold", longint'(w_out), longint'(wt));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
