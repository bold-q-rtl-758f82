// boldq_quant: quantization module producing the next layer's inputs.
//
// Takes Dequant_Act, one block of BLK LNS16 values, runs ADBQ on it to get the
// block's Dual-Bias and LNS8_E5M3 scale factor, and re-quantizes every element
// with fixed-point additions only: y = log2|x| - log2(s) in 1/8 steps is
//   y8 = round(mag/128) - sf.
//   QM_A8: OAct = LNS8_E4M3 {sign, y8 + 32}, clamped to 127; y8 + 32 <= 0
//          (below 2^-3.875, i.e. 2^-11.75 of the block maximum) becomes zero. Dual-Bias is 0 (8-bit paths carry none).
//   QM_A4: OAct = {4'b0, sign, code}, code = the LNS4_E2M1 bin nearest to y8
//          in the log domain, with the top two bin_l moved by Dual-Bias:
//          bin_l (in 1/8) -12, -8, -4, 0, 4, 8+2*Sub-Bias, 12+2*(Sub-Bias+Bias);
//          y8 below -20 (2^-2.5, halfway between 0 and the lowest bin in the
//          log scale) becomes code 0. Ties go to the lower code.
// Timing: one register stage; in_valid in cycle t gives out_valid, OAct,
// Dual-Bias and ScaleFactor in cycle t+1.
module boldq_quant
  import boldq_pkg::*;
#(
  parameter int N = BLK
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  qmode_e     mode,
  input  lns16_t     dq_act [N],
  output logic       out_valid,
  output logic [7:0] oact   [N],
  output dual_bias_t db,
  output sf_t        sf
);

  dual_bias_t db_c;
  sf_t        sf_c;
  logic [14:0] t1, t2, t3;
  logic [7:0] q_c [N];

  boldq_adbq #(.N(N)) u_adbq (
    .vec  (dq_act),
    .mode (mode),
    .top1 (t1),
    .top2 (t2),
    .top3 (t3),
    .db   (db_c),
    .sf   (sf_c)
  );

  logic signed [10:0] bin_l [1:7];
  always_comb begin
    bin_l[1] = -11'sd12;
    bin_l[2] = -11'sd8;
    bin_l[3] = -11'sd4;
    bin_l[4] = 11'sd0;
    bin_l[5] = 11'sd4;
    bin_l[6] = 11'sd8  + $signed({6'd0, db_c.sub, 1'b0});
    bin_l[7] = 11'sd12 + $signed({6'd0, db_c.sub, 1'b0}) + $signed({6'd0, db_c.bias, 1'b0});
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic signed [10:0] y8, dst, best_d;
      logic [2:0]         best_c;
      y8 = $signed({1'b0, 10'((dq_act[i].mag + 15'd64) >> 7)}) - $signed({3'b000, sf_c});
      best_c = 3'd1;
      best_d = 11'sd1023;
      for (int c = 1; c <= 7; c++) begin
        dst = (y8 > bin_l[c]) ? (y8 - bin_l[c]) : (bin_l[c] - y8);
        if (dst < best_d) begin
          best_d = dst;
          best_c = 3'(c);
        end
      end
      if (dq_act[i].mag == '0) begin
        q_c[i] = '0;
      end else if (mode == QM_A8) begin
        if (y8 + 11'(LNS8_OFF8) <= 11'sd0)       q_c[i] = '0;
        else if (y8 + 11'(LNS8_OFF8) > 11'sd127) q_c[i] = {dq_act[i].s, 7'd127};
        else                                     q_c[i] = {dq_act[i].s, 7'(y8 + 11'(LNS8_OFF8))};
      end else begin
        if (y8 < -11'sd20) q_c[i] = '0;
        else               q_c[i] = {4'b0000, dq_act[i].s, best_c};
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      db        <= '0;
      sf        <= '0;
      for (int i = 0; i < N; i++) oact[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        db <= db_c;
        sf <= sf_c;
        for (int i = 0; i < N; i++) oact[i] <= q_c[i];
      end
    end
  end

  logic unused_top;
  assign unused_top = ^{t1, t2, t3};

endmodule
