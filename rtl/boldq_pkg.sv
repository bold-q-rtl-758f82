// boldq_pkg: number formats and sizes shared by the BOLD-Q accelerator.
//
// Every value in the datapath is in a logarithmic number system (LNS): a sign
// bit plus an unsigned fixed-point magnitude field that encodes log2|x| with a
// fixed offset. A magnitude field of all zeros stands for the value zero in
// every format (the 4-bit weight format defines code 000 as zero; the wider
// formats follow the same rule by this design's choice).
//
//   lns4_t   LNS4_E2M1 weight / KV code {sign, code[2:0]}:
//            code 1..7 -> log2|x| = (code-4)/2, i.e. 2^-1.5 .. 2^+1.5.
//            With Dual-Bias the top two bins move: code 7 -> 1.5+Sub-Bias+Bias,
//            code 6 -> 1.0+Sub-Bias; the others stay put.
//   Dual-Bias {Bias[3:0], Sub-Bias[3:0]} in one of two encodings chosen by W_mode:
//            LNS4_E0M3 (static, weights): sign + 3 fraction bits, +-m/8;
//            LNS4_E2M2 (dynamic, activations/KV): unsigned 2.2 fixed point, b/4.
//   lns8_t   LNS8_E4M3 activation {sign, mag[6:0]}: log2|x| = mag/8 - 4
//            (2^-3.875 .. 2^11.875; re-quantization puts a block's largest
//            value at 2^7.875, mag 95, which leaves the accumulator headroom).
//   Aligned_W the same 8-bit layout for preprocessed weights, with offset 3:
//            log2|w| = mag/8 - 3, which covers every LNS4 weight bin with any
//            Dual-Bias (-1.5 .. +9) without clamping.
//   sf_t     LNS8_E5M3 per-block scale factor: log2(s) = sf/8 - 16.
//   Product  in the PE: 8-bit sum of two LNS8 magnitudes, {Exp[4:0], M[2:0]},
//            log2|p| = sum/8 - 7.
//   acc_t    32-bit two's-complement accumulator, LSB = 2^-14 (7 fraction bits
//            of the Q1.7 LUT value plus the 7 of the product offset). A block
//            of 32 products of 2^7.875 activations and 2^3.25 weights stays
//            below 2^31 LSBs.
//   lns16_t  LNS16 {sign, mag[14:0]}, magnitude unsigned 5.10 fixed point.
//            At the encoder output log2|acc| = mag/1024 - 14 (accumulator
//            units); after dequantization log2|x| = mag/1024 - 16.
package boldq_pkg;

  localparam int SA_ROWS  = 32;   // systolic array rows (reduction dimension)
  localparam int SA_COLS  = 32;   // systolic array columns (output channels)
  localparam int BLK      = 32;   // quantization block size
  localparam int ACC_W    = 32;   // partial sum width

  localparam int LNS8_OFF8  = 32;  // activations: mag = 8*log2|x| + 32
  localparam int W_OFF8     = 24;  // aligned weights: mag = 8*log2|w| + 24
  localparam int A8_TOP     = 95;  // re-quantized block maximum (2^7.875)
  localparam int SF_OFF8    = 128; // scale factor: sf = 8*log2(s) + 128
  localparam int ACC_FRAC   = 14;  // accumulator fraction bits
  localparam int LNS16_OFF  = 16;  // offset of dequantized LNS16 values

  typedef logic [3:0] lns4_t;

  typedef struct packed {
    logic       s;
    logic [6:0] mag;
  } lns8_t;

  typedef struct packed {
    logic        s;
    logic [14:0] mag;
  } lns16_t;

  typedef logic [7:0] sf_t;

  typedef struct packed {
    logic [3:0] bias;
    logic [3:0] sub;
  } dual_bias_t;

  typedef logic signed [ACC_W-1:0] acc_t;

  // Bias encoding selected by W_mode.
  typedef enum logic {
    WM_E0M3 = 1'b0,   // static weight Dual-Bias (OBWQ)
    WM_E2M2 = 1'b1    // dynamic Dual-Bias (ADBQ), e.g. the 4-bit KV cache
  } wmode_e;

  // Target precision of the re-quantization step.
  typedef enum logic {
    QM_A8 = 1'b0,     // LNS8_E4M3, scale factor only
    QM_A4 = 1'b1      // LNS4_E2M1 with Dual-Bias
  } qmode_e;

  // Per-block metadata: 16 bits per block (Dual-Bias + LNS scale factor).
  typedef struct packed {
    dual_bias_t db;
    sf_t        sf;
  } blk_meta_t;

endpackage
