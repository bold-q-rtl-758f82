// boldq_pe: LNS-MAC processing element of the weight-stationary array.
//
// Multiply: the LNS8 activation IAct and the stationary Aligned_W are added as
// 7-bit log magnitudes by an 8-bit fixed-point adder; the signs are XORed. The
// 8-bit product log is split into Exp[4:0] (integer part) and M[2:0]
// (fraction). Accumulate: M addresses an 8-entry LUT holding 2^(m/8) in Q1.7,
// LUT_Val is shifted left by Exp into Psum[31:0], and Psum is added to (or,
// for a negative product, subtracted from) the partial sum IAcc coming from
// the PE above to give OAcc, which goes to the PE below. There is no
// multiplier anywhere in the PE. With the operand offsets of boldq_pkg the
// product is 2^(sum/8 - 7) and Psum carries 14 fraction bits.
//
// LUT contents: round(128 * 2^(m/8)) for m = 0..7.
// A zero operand gives Psum = 0. A shifted LUT value that does not fit a
// positive 32-bit number is saturated to 2^31-1 (this design's choice; the
// block scale factors keep products far below that in normal use). The
// column sum itself wraps like any two's-complement adder.
//
// Timing: one cycle. While w_load is high the weight register takes w_in (from
// the PE above / the preprocessing row) and w_out passes the old value down, so
// a column of weights is shifted in over SA_ROWS cycles. a_out and acc_out are
// registered every cycle (activations flow right, partial sums flow down).
module boldq_pe
  import boldq_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  w_load,
  input  lns8_t w_in,
  output lns8_t w_out,
  input  lns8_t a_in,
  output lns8_t a_out,
  input  acc_t  acc_in,
  output acc_t  acc_out
);

  lns8_t w_q;

  logic [7:0]  prod;        // {Exp, M}
  logic [4:0]  exp_f;
  logic [2:0]  m_f;
  logic [7:0]  lut_val;
  logic [38:0] shifted;
  logic [31:0] psum_mag;
  acc_t        psum;
  logic        zero_op;

  always_comb begin
    prod  = {1'b0, a_in.mag} + {1'b0, w_q.mag};
    exp_f = prod[7:3];
    m_f   = prod[2:0];
    unique case (m_f)
      3'd0: lut_val = 8'd128;
      3'd1: lut_val = 8'd140;
      3'd2: lut_val = 8'd152;
      3'd3: lut_val = 8'd166;
      3'd4: lut_val = 8'd181;
      3'd5: lut_val = 8'd197;
      3'd6: lut_val = 8'd215;
      default: lut_val = 8'd235;
    endcase
    shifted  = {31'd0, lut_val} << exp_f;
    psum_mag = (shifted[38:31] != '0) ? 32'h7fff_ffff : shifted[31:0];
    zero_op  = (a_in.mag == '0) || (w_q.mag == '0);
    if (zero_op)                  psum = '0;
    else if (a_in.s ^ w_q.s)      psum = -$signed(psum_mag);
    else                          psum = $signed(psum_mag);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_q     <= '0;
      a_out   <= '0;
      acc_out <= '0;
    end else begin
      if (w_load) w_q <= w_in;
      a_out   <= a_in;
      acc_out <= acc_in + psum;
    end
  end

  assign w_out = w_q;

endmodule
