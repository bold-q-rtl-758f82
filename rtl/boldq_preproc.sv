// boldq_preproc: Dual-Bias preprocessing unit (one per systolic-array column).
//
// Takes one 4-bit LNS4_E2M1 weight W = {sign, code[2:0]} and the block's
// Dual-Bias, and produces the 8-bit LNS operand Aligned_W that the PEs consume.
// As in the described architecture it has three parts:
//   * Bias Gen: decodes Bias[3:0] / Sub-Bias[3:0] in the encoding chosen by
//     W_mode (LNS4_E0M3 sign+3 fraction bits, or LNS4_E2M2 unsigned 2.2) and
//     selects, from the weight code, Sub-Bias+Bias (top bin, code 7),
//     Sub-Bias (second bin, code 6) or nothing (all other bins);
//   * a fixed-point adder that adds that bias to the weight's log magnitude;
//   * Align: re-offsets the sum into the 8-bit LNS magnitude field
//     (mag = 8*log2|w| + 24) so that it adds directly to LNS8 activations.
// Everything is in units of 1/8 in the log domain. Code 000 is zero and gives a
// zero operand. The result lies in 12..96 for every input; the clamp to
// 1..127 only guards the field.
//
// Purely combinational; the PE row below registers the result.
module boldq_preproc
  import boldq_pkg::*;
(
  input  lns4_t      w,        // {sign, code}
  input  logic [3:0] bias,
  input  logic [3:0] sub_bias,
  input  wmode_e     w_mode,
  output lns8_t      aligned_w
);

  // Bias Gen: decode a 4-bit bias into signed 1/8 units.
  function automatic logic signed [5:0] dec_bias(input logic [3:0] b, input wmode_e m);
    if (m == WM_E0M3)
      return b[3] ? -$signed({3'b000, b[2:0]}) : $signed({3'b000, b[2:0]});
    else
      return $signed({1'b0, b, 1'b0});   // b/4 = 2b/8
  endfunction

  logic signed [5:0] bias8, sub8;
  logic signed [7:0] add8;     // bias actually applied
  logic signed [7:0] base8;    // (code-4)/2 in 1/8 units = 4*(code-4)
  logic signed [8:0] sum8;     // aligned magnitude before clamping

  always_comb begin
    bias8 = dec_bias(bias, w_mode);
    sub8  = dec_bias(sub_bias, w_mode);
    unique case (w[2:0])
      3'd7:    add8 = 8'(sub8) + 8'(bias8);
      3'd6:    add8 = 8'(sub8);
      default: add8 = '0;
    endcase
    base8 = $signed({3'b000, w[2:0], 2'b00}) - 8'sd16;
    sum8  = 9'(base8) + 9'(add8) + 9'(W_OFF8);

    if (w[2:0] == 3'd0) begin
      aligned_w = '0;
    end else begin
      aligned_w.s = w[3];
      if (sum8 < 9'sd1)        aligned_w.mag = 7'd1;
      else if (sum8 > 9'sd127) aligned_w.mag = 7'd127;
      else                     aligned_w.mag = sum8[6:0];
    end
  end

endmodule
