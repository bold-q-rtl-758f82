// boldq_encoder: lin-to-log encoder at the bottom of each array column.
//
// Converts a 32-bit two's-complement column sum into LNS16 {sign, mag[14:0]},
// mag = 1024 * log2|acc| (unsigned 5.10, in accumulator units, see boldq_pkg).
// It uses Mitchell's approximation, log2(2^k (1+m)) ~ k + m, with the leading
// one position k as integer part and the 10 bits below it as m, and then adds
// a correction for the error e(m) = log2(1+m) - m:
//   * piecewise-linear part: x/4 with x = min(m, 1-m) (two segments, one shift);
//   * residual part: a 16-entry LUT indexed by the top 4 bits of m holding the
//     mid-range of e(m) - x/4 over each sixteenth of [0,1), in units of 2^-10.
// With the truncation of m to 10 bits the remaining error stays below 10/1024
// in log2 (about 0.7 % in value).
// Mitchell + PWL + small residual LUT follows the described encoder; the
// segment choice and the LUT values are this design's own.
// |acc| of 0 or 1 encodes as zero (mag 0). Purely combinational.
module boldq_encoder
  import boldq_pkg::*;
(
  input  acc_t   acc,
  output lns16_t enc
);

  logic [31:0]        mag;
  logic [4:0]         k;
  logic [30:0]        norm;
  logic [9:0]         m;
  logic [9:0]         x;
  logic [7:0]         pwl;
  logic signed [7:0]  res;
  logic signed [16:0] l;

  always_comb begin
    mag = acc[31] ? 32'(-acc) : 32'(acc);
    k   = '0;
    for (int i = 0; i < 32; i++) if (mag[i]) k = 5'(i);
    norm = 31'(mag << (5'd31 - k));  // leading one shifted out of the top
    m    = norm[30:21];
    x    = m[9] ? 10'(11'd1024 - {1'b0, m}) : m;
    pwl  = x[9:2];
    unique case (m[9:6])
      4'd0:  res = 8'sd6;
      4'd1:  res = 8'sd13;
      4'd2:  res = 8'sd15;
      4'd3:  res = 8'sd13;
      4'd4:  res = 8'sd7;
      4'd5:  res = -8'sd3;
      4'd6:  res = -8'sd16;
      4'd7:  res = -8'sd31;
      4'd8:  res = -8'sd35;
      4'd9:  res = -8'sd23;
      4'd10: res = -8'sd14;
      4'd11: res = -8'sd8;
      4'd12: res = -8'sd3;
      4'd13: res = 8'sd0;
      default: res = 8'sd2;
    endcase
    l = $signed({2'b00, k, 10'd0}) + $signed({7'd0, m}) + $signed({9'd0, pwl}) + 17'(res);

    enc.s = acc[31];
    if (mag <= 32'd1)          enc.mag = '0;
    else if (l > 17'sd32767)   enc.mag = 15'h7fff;
    else if (l < 17'sd1)       enc.mag = 15'd1;
    else                       enc.mag = l[14:0];
  end

endmodule
