// boldq_adbq: adaptive Dual-Bias quantization (ADBQ) for one block.
//
// Input: a block of BLK LNS16 values (dequantized, log2|x| = mag/1024 - 16).
// 1. Top-3: the three largest magnitudes L1 >= L2 >= L3 of the block are found
//    by a chain of compare-and-insert stages (log magnitudes order like values).
// 2. Gaps d12 = L1 - L2 and d23 = L2 - L3 (log2 units).
// 3. Bias = max(RTN(d12 - 0.5), 0), Sub-Bias = max(RTN(d23 - 0.5), 0), with RTN
//    rounding to the LNS4_E2M2 grid (step 0.25, largest 3.75; larger values
//    clamp). Only the excess of a gap over the native 0.5 bin step becomes bias.
// 4. LNS8_E5M3 scale factor (log2 s = sf/8 - 16), rounded up to the 1/8 step so
//    that no element exceeds the target range:
//      8-bit target (mode QM_A8): top-1 lands on 2^7.875 (LNS8 mag 95, see
//        boldq_pkg); Dual-Bias is reported as 0 (not used on 8-bit paths).
//      4-bit target (mode QM_A4): top-1 lands on the biased top bin
//        2^(1.5+Sub-Bias+Bias), so top-2 lands near 2^(1.0+Sub-Bias) and
//        top-3 near 2^0.5.
// Steps 1-3 follow the described algorithm; the scale rule in 4 is this
// design's reading of "extend the blockwise top-1 principle". A block with
// fewer than three non-zero values sees a large gap and gets the largest bias.
// Combinational.
module boldq_adbq
  import boldq_pkg::*;
#(
  parameter int N = BLK
) (
  input  lns16_t     vec [N],
  input  qmode_e     mode,
  output logic [14:0] top1,
  output logic [14:0] top2,
  output logic [14:0] top3,
  output dual_bias_t db,
  output sf_t        sf
);

  function automatic logic [3:0] rtn_e2m2_excess(input logic [14:0] d);
    logic [14:0] q;
    if (d < 15'd512) return 4'd0;
    q = (d - 15'd512 + 15'd128) >> 8;
    return (q > 15'd15) ? 4'd15 : q[3:0];
  endfunction

  logic [14:0] t1, t2, t3;
  logic [3:0]  bias_c, sub_c;
  logic signed [10:0] sfv;

  always_comb begin
    t1 = '0; t2 = '0; t3 = '0;
    for (int i = 0; i < N; i++) begin
      if (vec[i].mag > t1) begin
        t3 = t2; t2 = t1; t1 = vec[i].mag;
      end else if (vec[i].mag > t2) begin
        t3 = t2; t2 = vec[i].mag;
      end else if (vec[i].mag > t3) begin
        t3 = vec[i].mag;
      end
    end
    bias_c = rtn_e2m2_excess(t1 - t2);
    sub_c  = rtn_e2m2_excess(t2 - t3);

    if (mode == QM_A8)
      sfv = $signed({1'b0, 10'(({1'b0, t1} + 16'd127) >> 7)}) - 11'(A8_TOP - LNS8_OFF8);
    else
      sfv = $signed({1'b0, 10'(({1'b0, t1} + 16'd127) >> 7)}) - 11'sd12
            - $signed({5'd0, ({1'b0, sub_c} + {1'b0, bias_c}), 1'b0});

    if (t1 == '0 || sfv < 11'sd0) sf = '0;
    else if (sfv > 11'sd255)      sf = 8'd255;
    else                          sf = sfv[7:0];

    if (mode == QM_A4) begin
      db.bias = bias_c;
      db.sub  = sub_c;
    end else begin
      db = '0;
    end
  end

  assign top1 = t1;
  assign top2 = t2;
  assign top3 = t3;

endmodule
