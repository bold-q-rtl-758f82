// boldq_top: BOLD-Q accelerator - one weight tile times a stream of
// activation blocks, from the buffers back into the quant buffer.
//
// Dataflow (all in the log domain except the column sums):
//   weight buffer -> Dual-Bias preprocessing row -> 32x32 LNS-MAC array
//   activation buffer ---------------------------->  (weight stationary)
//   array columns -> 32 lin-to-log encoders -> 32 dequantizers (+ sf_w + sf_a)
//   -> quantization module (ADBQ + re-quantization) -> quant buffer.
// Each output vector of COLS values forms one block for the next layer.
//
// Operation, started by a one-cycle `start` pulse while idle:
//   1. LOAD   ROWS cycles: reads the tile's rows from the weight buffer, last
//             reduction row first, through the preprocessing row into the array
//             (Dual-Bias encoding chosen by cfg_w_mode).
//   2. STREAM cfg_n_vec cycles: reads one activation vector per cycle from
//             cfg_a_base upward into the array.
//   3. DRAIN  waits until every vector's result has been quantized
//             (cfg_q_mode: 8-bit LNS8_E4M3 or 4-bit LNS4_E2M1 with Dual-Bias)
//             and written to the quant buffer from cfg_q_base upward.
//   `done` pulses for one cycle at the end; `busy` is high from start to done.
// Latency: the first result is written ROWS + COLS + 2 cycles after the first
// activation enters the array; then one result per cycle.
// The sequencing controller, buffer sizes and host ports are this design's
// own; the datapath blocks follow the described architecture.
module boldq_top
  import boldq_pkg::*;
#(
  parameter int ROWS    = SA_ROWS,
  parameter int COLS    = SA_COLS,
  parameter int WTILES  = 2,
  parameter int ADEPTH  = 64,
  parameter int QDEPTH  = 64,
  localparam int WAW    = $clog2(WTILES * ROWS),
  localparam int WTW    = (WTILES > 1) ? $clog2(WTILES) : 1,
  localparam int WCW    = $clog2(COLS),
  localparam int AAW    = $clog2(ADEPTH),
  localparam int QAW    = $clog2(QDEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // weight buffer host port
  input  logic           wb_we,
  input  logic [WAW-1:0] wb_waddr,
  input  lns4_t          wb_wdata [COLS],
  input  logic           wb_meta_we,
  input  logic [WTW-1:0] wb_meta_tile,
  input  logic [WCW-1:0] wb_meta_col,
  input  blk_meta_t      wb_meta_wdata,
  // activation buffer host port
  input  logic           ab_we,
  input  logic [AAW-1:0] ab_waddr,
  input  lns8_t          ab_wdata [ROWS],
  input  blk_meta_t      ab_wmeta,
  // quant buffer host read port
  input  logic [QAW-1:0] qb_raddr,
  output logic [7:0]     qb_rdata [COLS],
  output blk_meta_t      qb_rmeta,
  // command
  input  logic           start,
  input  logic [WTW-1:0] cfg_tile,
  input  logic [AAW-1:0] cfg_a_base,
  input  logic [AAW:0]   cfg_n_vec,
  input  logic [QAW-1:0] cfg_q_base,
  input  wmode_e         cfg_w_mode,
  input  qmode_e         cfg_q_mode,
  output logic           busy,
  output logic           done
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_STREAM, S_DRAIN} state_e;
  state_e state;

  // latched configuration
  logic [WTW-1:0] tile_q;
  logic [AAW-1:0] a_base_q;
  logic [AAW:0]   n_vec_q;
  logic [QAW-1:0] q_base_q;
  wmode_e         w_mode_q;
  qmode_e         q_mode_q;

  logic [AAW:0]   cnt;        // LOAD: rows issued, STREAM: vectors issued
  logic [AAW:0]   o_cnt;      // vectors out of the array
  logic [AAW:0]   q_cnt;      // vectors written to the quant buffer
  logic           w_rd, a_rd; // read issued this cycle
  logic           w_load, a_valid;

  // ---------------- buffers ----------------
  logic [WAW-1:0] wb_raddr;
  lns4_t          wb_rdata [COLS];
  blk_meta_t      wb_rmeta [COLS];
  logic [AAW-1:0] ab_raddr, ab_maddr;
  lns8_t          ab_rdata [ROWS];
  blk_meta_t      ab_rmeta;   // only .sf is used: 8-bit activations carry no Dual-Bias

  boldq_wbuf #(.ROWS(ROWS), .COLS(COLS), .TILES(WTILES)) u_wbuf (
    .clk        (clk),
    .we         (wb_we),
    .waddr      (wb_waddr),
    .wdata      (wb_wdata),
    .meta_we    (wb_meta_we),
    .meta_tile  (wb_meta_tile),
    .meta_col   (wb_meta_col),
    .meta_wdata (wb_meta_wdata),
    .raddr      (wb_raddr),
    .rdata      (wb_rdata),
    .rtile      (tile_q),
    .rmeta      (wb_rmeta)
  );

  boldq_abuf #(.ROWS(ROWS), .DEPTH(ADEPTH)) u_abuf (
    .clk   (clk),
    .we    (ab_we),
    .waddr (ab_waddr),
    .wdata (ab_wdata),
    .wmeta (ab_wmeta),
    .raddr (ab_raddr),
    .rdata (ab_rdata),
    .maddr (ab_maddr),
    .rmeta (ab_rmeta)
  );

  // ---------------- controller ----------------
  always_comb begin
    w_rd     = (state == S_LOAD);
    a_rd     = (state == S_STREAM);
    wb_raddr = WAW'(tile_q * ROWS + (ROWS - 1) - int'(cnt));
    ab_raddr = AAW'(a_base_q + cnt);
    ab_maddr = AAW'(a_base_q + o_cnt);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      cnt      <= '0;
      tile_q   <= '0;
      a_base_q <= '0;
      n_vec_q  <= '0;
      q_base_q <= '0;
      w_mode_q <= WM_E0M3;
      q_mode_q <= QM_A8;
      w_load   <= 1'b0;
      a_valid  <= 1'b0;
      done     <= 1'b0;
    end else begin
      w_load  <= w_rd;
      a_valid <= a_rd;
      done    <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          tile_q   <= cfg_tile;
          a_base_q <= cfg_a_base;
          n_vec_q  <= cfg_n_vec;
          q_base_q <= cfg_q_base;
          w_mode_q <= cfg_w_mode;
          q_mode_q <= cfg_q_mode;
          cnt      <= '0;
          state    <= S_LOAD;
        end
        S_LOAD: begin
          if (int'(cnt) == ROWS - 1) begin
            cnt   <= '0;
            state <= (cfg_n_vec_zero(n_vec_q)) ? S_DRAIN : S_STREAM;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STREAM: begin
          if (cnt == n_vec_q - 1'b1) state <= S_DRAIN;
          cnt <= cnt + 1'b1;
        end
        S_DRAIN: begin
          if (q_cnt == n_vec_q && !w_load && !a_valid) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  function automatic logic cfg_n_vec_zero(input logic [AAW:0] n);
    return n == '0;
  endfunction

  assign busy = (state != S_IDLE);

  // ---------------- array with preprocessing row ----------------
  dual_bias_t w_db [COLS];
  logic       sa_valid;
  acc_t       sa_acc [COLS];

  always_comb begin
    for (int c = 0; c < COLS; c++) w_db[c] = wb_rmeta[c].db;
  end

  boldq_sa #(.ROWS(ROWS), .COLS(COLS)) u_sa (
    .clk       (clk),
    .rst_n     (rst_n),
    .w_load    (w_load),
    .w_row     (wb_rdata),
    .w_db      (w_db),
    .w_mode    (w_mode_q),
    .a_valid   (a_valid),
    .a_vec     (ab_rdata),
    .out_valid (sa_valid),
    .out_acc   (sa_acc)
  );

  // ---------------- encoders and dequantizers (one per column) ----------------
  lns16_t enc [COLS];
  lns16_t deq [COLS];
  lns16_t deq_q [COLS];
  logic   deq_valid;

  for (genvar c = 0; c < COLS; c++) begin : g_col
    boldq_encoder u_enc (
      .acc (sa_acc[c]),
      .enc (enc[c])
    );
    boldq_dequant u_deq (
      .in   (enc[c]),
      .sf_w (wb_rmeta[c].sf),
      .sf_a (ab_rmeta.sf),
      .out  (deq[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      deq_valid <= 1'b0;
      o_cnt     <= '0;
      for (int c = 0; c < COLS; c++) deq_q[c] <= '0;
    end else begin
      deq_valid <= sa_valid;
      if (sa_valid) begin
        for (int c = 0; c < COLS; c++) deq_q[c] <= deq[c];
        o_cnt <= o_cnt + 1'b1;
      end
      if (state == S_IDLE && start) o_cnt <= '0;
    end
  end

  // ---------------- quantization module and quant buffer ----------------
  logic       q_valid;
  logic [7:0] q_act [COLS];
  dual_bias_t q_db;
  sf_t        q_sf;

  boldq_quant #(.N(COLS)) u_quant (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (deq_valid),
    .mode      (q_mode_q),
    .dq_act    (deq_q),
    .out_valid (q_valid),
    .oact      (q_act),
    .db        (q_db),
    .sf        (q_sf)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cnt <= '0;
    end else begin
      if (q_valid) q_cnt <= q_cnt + 1'b1;
      if (state == S_IDLE && start) q_cnt <= '0;
    end
  end

  boldq_qbuf #(.COLS(COLS), .DEPTH(QDEPTH)) u_qbuf (
    .clk   (clk),
    .we    (q_valid),
    .waddr (QAW'(q_base_q + q_cnt)),
    .wdata (q_act),
    .wmeta ('{db: q_db, sf: q_sf}),
    .raddr (qb_raddr),
    .rdata (qb_rdata),
    .rmeta (qb_rmeta)
  );

  // Weight loading and activation streaming never overlap in the array.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(w_load && a_valid));
  // A new operation is only accepted while idle; results never outnumber inputs.
  a_q_bound: assert property (@(posedge clk) disable iff (!rst_n) q_cnt <= n_vec_q);

endmodule
