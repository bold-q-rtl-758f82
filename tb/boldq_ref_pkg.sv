// boldq_ref_pkg: reference model of the BOLD-Q number formats and datapath for
// the testbenches. Written from the format definitions in real arithmetic
// (log2, pow), not from the RTL's bit manipulations.
package boldq_ref_pkg;
  import boldq_pkg::*;

  function automatic real log2r(input real x);
    return $ln(x) / $ln(2.0);
  endfunction

  function automatic int rnd(input real x);   // round half up
    return $rtoi($floor(x + 0.5));
  endfunction

  // Bias value in log2 units.
  function automatic real bias_val(input logic [3:0] b, input wmode_e m);
    if (m == WM_E0M3) return (b[3] ? -1.0 : 1.0) * real'(b[2:0]) / 8.0;
    return real'(b) / 4.0;
  endfunction

  // Preprocessing: 4-bit weight + Dual-Bias -> aligned LNS8.
  function automatic lns8_t ref_align(input lns4_t w, input dual_bias_t db, input wmode_e m);
    real   y;
    int    mg;
    lns8_t r;
    if (w[2:0] == 0) return '0;
    y = (real'(w[2:0]) - 4.0) / 2.0;
    if (w[2:0] == 7) y += bias_val(db.sub, m) + bias_val(db.bias, m);
    if (w[2:0] == 6) y += bias_val(db.sub, m);
    mg = rnd(y * 8.0 + 24.0);
    if (mg > 127) mg = 127;
    if (mg < 1) mg = 1;
    r.s = w[3];
    r.mag = 7'(mg);
    return r;
  endfunction

  // PE product as a partial sum (LSB 2^-14), LUT entries round(128*2^(m/8)).
  function automatic longint ref_psum(input lns8_t a, input lns8_t w);
    int p, e, m;
    longint mag;
    if (a.mag == 0 || w.mag == 0) return 0;
    p = int'(a.mag) + int'(w.mag);
    e = p / 8; m = p % 8;
    mag = longint'(rnd(128.0 * (2.0 ** (real'(m) / 8.0)))) << e;
    if (mag > 64'h7fff_ffff) mag = 64'h7fff_ffff;
    return (a.s ^ w.s) ? -mag : mag;
  endfunction

  // Exact log2 of a column sum in units of 2^-10 (the encoder approximates it).
  function automatic real ref_log1024(input acc_t acc);
    longint m;
    m = (acc < 0) ? -longint'(acc) : longint'(acc);
    return log2r(real'(m)) * 1024.0;
  endfunction

  // Dequantization, from the encoder's LNS16 magnitude.
  function automatic lns16_t ref_dequant(input lns16_t in, input sf_t sfw, input sf_t sfa);
    real    lg;
    int     mg;
    lns16_t r;
    if (in.mag == 0) return '0;
    lg = (real'(in.mag) / 1024.0 - 14.0) + (real'(sfw) / 8.0 - 16.0) + (real'(sfa) / 8.0 - 16.0);
    mg = rnd((lg + 16.0) * 1024.0);
    if (mg < 1) return '0;
    if (mg > 32767) mg = 32767;
    r.s = in.s;
    r.mag = 15'(mg);
    return r;
  endfunction

  // Excess of a gap over 0.5, rounded to the LNS4_E2M2 grid, clamped to 0..3.75.
  function automatic int ref_excess(input real gap);
    int q;
    q = rnd((gap - 0.5) / 0.25);
    if (q < 0) q = 0;
    if (q > 15) q = 15;
    return q;
  endfunction

  // ADBQ reference: top-3 by sorting, Dual-Bias, scale factor.
  function automatic void ref_adbq(input lns16_t v [], input qmode_e mode,
                                   output dual_bias_t db, output sf_t sf);
    int mags [$];
    real l1, l2, l3, target;
    int b, s, sfi;
    foreach (v[i]) mags.push_back(int'(v[i].mag));
    mags.rsort();
    l1 = real'(mags[0]) / 1024.0;
    l2 = real'(mags[1]) / 1024.0;
    l3 = real'(mags[2]) / 1024.0;
    b = ref_excess(l1 - l2);
    s = ref_excess(l2 - l3);
    if (mode == QM_A8) target = 7.875;
    else               target = 1.5 + real'(s) / 4.0 + real'(b) / 4.0;
    // log2 s = (l1 - 16) - target rounded up to 1/8; sf = 8*log2 s + 128
    sfi = $rtoi($ceil(((l1 - 16.0) - target) * 8.0 - 1e-9)) + 128;
    if (mags[0] == 0 || sfi < 0) sfi = 0;
    if (sfi > 255) sfi = 255;
    sf = 8'(sfi);
    if (mode == QM_A4) db = '{bias: 4'(b), sub: 4'(s)};
    else               db = '0;
  endfunction

  // Re-quantization of one element given the block's Dual-Bias and scale.
  function automatic logic [7:0] ref_requant(input lns16_t x, input qmode_e mode,
                                             input dual_bias_t db, input sf_t sf);
    int  y8, best_c, best_d, d;
    real binv [8];
    if (x.mag == 0) return 8'h00;
    y8 = rnd(real'(x.mag) / 128.0) - int'(sf);
    if (mode == QM_A8) begin
      if (y8 + 32 <= 0) return 8'h00;
      if (y8 + 32 > 127) return {x.s, 7'd127};
      return {x.s, 7'(y8 + 32)};
    end
    if (y8 < -20) return 8'h00;
    for (int c = 1; c <= 5; c++) binv[c] = (real'(c) - 4.0) / 2.0;
    binv[6] = 1.0 + real'(db.sub) / 4.0;
    binv[7] = 1.5 + real'(db.sub) / 4.0 + real'(db.bias) / 4.0;
    best_c = 1; best_d = 1 << 30;
    for (int c = 1; c <= 7; c++) begin
      d = rnd(real'(y8) - binv[c] * 8.0);
      if (d < 0) d = -d;
      if (d < best_d) begin best_d = d; best_c = c; end
    end
    return {4'b0000, x.s, 3'(best_c)};
  endfunction

endpackage
