// boldq_sa: weight-stationary LNS-MAC systolic array with its preprocessing row.
//
// ROWS x COLS boldq_pe instances (32 x 32 by default). Weights enter at the
// top: one row of COLS 4-bit LNS4_E2M1 codes per cycle passes through the row
// of COLS boldq_preproc units, which apply each column's Dual-Bias and align
// the weights to LNS8, and is shifted down the columns while w_load is high.
// After ROWS load cycles the row fed first sits in the bottom PE row, so the
// caller feeds the reduction index ROWS-1 first and 0 last. The preprocessing
// row is the only place Dual-Bias is handled; the PEs have no bias logic.
//
// Activations: one vector a_vec of ROWS LNS8 values per cycle (element k
// belongs to array row k), qualified by a_valid. The array skews them itself
// (row k is delayed k cycles) so that they move left to right in a diagonal
// wavefront; partial sums start at 0 in the top row and flow down. The bottom
// row's column sums are de-skewed (column j delayed COLS-1-j cycles) so that
// out_acc holds the COLS dot products of one input vector together.
//
// Timing: a vector presented with a_valid in cycle t appears on out_acc with
// out_valid in cycle t + ROWS + COLS - 1. A new vector may enter every cycle.
// Weight loading and streaming must not overlap (the caller sequences them).
module boldq_sa
  import boldq_pkg::*;
#(
  parameter int ROWS = SA_ROWS,
  parameter int COLS = SA_COLS
) (
  input  logic       clk,
  input  logic       rst_n,
  // weight path
  input  logic       w_load,
  input  lns4_t      w_row  [COLS],
  input  dual_bias_t w_db   [COLS],
  input  wmode_e     w_mode,
  // activation path
  input  logic       a_valid,
  input  lns8_t      a_vec  [ROWS],
  // column outputs
  output logic       out_valid,
  output acc_t       out_acc [COLS]
);

  localparam int LAT = ROWS + COLS - 1;

  lns8_t aligned [COLS];
  lns8_t w_bus   [ROWS+1][COLS];
  lns8_t a_bus   [ROWS][COLS+1];
  acc_t  acc_bus [ROWS+1][COLS];

  // Dual-Bias preprocessing row
  for (genvar c = 0; c < COLS; c++) begin : g_pre
    boldq_preproc u_pre (
      .w         (w_row[c]),
      .bias      (w_db[c].bias),
      .sub_bias  (w_db[c].sub),
      .w_mode    (w_mode),
      .aligned_w (aligned[c])
    );
    assign w_bus[0][c]   = aligned[c];
    assign acc_bus[0][c] = '0;
  end

  // Input skew: row r sees the activation r cycles late.
  for (genvar r = 0; r < ROWS; r++) begin : g_skew
    if (r == 0) begin : g_direct
      assign a_bus[0][0] = a_valid ? a_vec[0] : '0;
    end else begin : g_delay
      lns8_t sk [r];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < r; i++) sk[i] <= '0;
        end else begin
          sk[0] <= a_valid ? a_vec[r] : '0;
          for (int i = 1; i < r; i++) sk[i] <= sk[i-1];
        end
      end
      assign a_bus[r][0] = sk[r-1];
    end
  end

  // PE grid
  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      boldq_pe u_pe (
        .clk     (clk),
        .rst_n   (rst_n),
        .w_load  (w_load),
        .w_in    (w_bus[r][c]),
        .w_out   (w_bus[r+1][c]),
        .a_in    (a_bus[r][c]),
        .a_out   (a_bus[r][c+1]),
        .acc_in  (acc_bus[r][c]),
        .acc_out (acc_bus[r+1][c])
      );
    end
  end

  // Output de-skew: column c is delayed COLS-1-c cycles.
  for (genvar c = 0; c < COLS; c++) begin : g_deskew
    if (c == COLS-1) begin : g_direct
      assign out_acc[c] = acc_bus[ROWS][c];
    end else begin : g_delay
      localparam int D = COLS - 1 - c;
      acc_t dk [D];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < D; i++) dk[i] <= '0;
        end else begin
          dk[0] <= acc_bus[ROWS][c];
          for (int i = 1; i < D; i++) dk[i] <= dk[i-1];
        end
      end
      assign out_acc[c] = dk[D-1];
    end
  end

  // Valid pipeline matching the array latency.
  logic [LAT-1:0] vld;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[LAT-2:0], a_valid};
  end
  assign out_valid = vld[LAT-1];

  // Unused: the bottom row's weight outputs and the right column's activations.
  logic unused;
  always_comb begin
    unused = 1'b0;
    for (int c = 0; c < COLS; c++) unused ^= ^w_bus[ROWS][c];
    for (int r = 0; r < ROWS; r++) unused ^= ^a_bus[r][COLS];
  end

endmodule
