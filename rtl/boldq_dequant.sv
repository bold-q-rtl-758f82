// boldq_dequant: dequantization of one LNS16 column result.
//
// The encoder output is log2 of the raw column sum. The true value of a dot
// product is that sum times the weight block's and the activation block's LNS
// scale factors, so in the log domain dequantization is two fixed-point
// additions, no multiplier: with sf/8 - 16 = log2(s) (LNS8_E5M3) and the
// output offset of 16,
//   mag_out = mag_in + 128*(sf_w + sf_a) - 30*1024
// (30 = 14 accumulator fraction bits + 2*16 scale offsets - 16 output offset).
// A result that underflows is flushed to zero, one that overflows saturates;
// both are this design's choices. Zero stays zero. Combinational.
module boldq_dequant
  import boldq_pkg::*;
(
  input  lns16_t in,
  input  sf_t    sf_w,
  input  sf_t    sf_a,
  output lns16_t out
);

  localparam int SHIFT = (ACC_FRAC + 2*16 - LNS16_OFF) * 1024;

  logic signed [18:0] l;

  always_comb begin
    l = $signed({4'd0, in.mag}) + $signed({2'b00, ({1'b0, sf_w} + {1'b0, sf_a}), 7'd0})
        - 19'(SHIFT);
    out.s = in.s;
    if (in.mag == '0 || l < 19'sd1) out = '0;
    else if (l > 19'sd32767)        out.mag = 15'h7fff;
    else                            out.mag = l[14:0];
  end

endmodule
