// pbnp_predictor: path-based neural branch predictor with modulo path-history
// and bias-based filtering.
//
// The prediction for a branch is the sign of y = w_0 + sum_{i=1..h} w_i x_i,
// where x_i is +1/-1 for the outcome of the i-th most recent branch. Weight
// w_i (i >= 1) is selected by the address of the branch (i mod P) positions
// back in the path (0 meaning the branch itself), so only the last P-1
// addresses matter and the h weights fall into P interleaved tables. w_0
// comes from a separate, larger bias table indexed by address XOR history.
//
// Lookup (one branch per cycle, prediction one cycle after the request):
//   cycle 1: lk_valid/lk_ready; all P weight tables and the bias table are
//            read at the branch's address (the bias table at the gshare
//            index).
//   cycle 2: pr_valid. Table P's row is dotted with the history and added to
//            the bias weight and the partial sum S[1] gathered at earlier
//            branches (pbnp_sum_pipeline). Bias-based filtering picks the
//            bias sign instead when the bias is saturated. Rows of tables
//            1..P-1 are dotted with this prediction and the history and
//            pushed into the partial-sum pipeline for the next P-1 branches.
//            The branch gets a checkpoint (tag pr_tag).
// Recovery: rc_valid with the tag of a mispredicted branch and its true
//   outcome restores partial sums, history and path to the state after that
//   branch and discards younger branches (including one in cycle 2).
// Update: up_valid/up_ready retires the oldest in-flight branch with its
//   outcome (commit order); pbnp_update_unit trains it unless the filter says
//   otherwise. A training read steals the table read ports for one cycle,
//   so lookups stall then.
// Stalls: lk_ready is low while the tables are cleared after reset, while
//   the checkpoint table is full, during a training read and during a
//   recovery cycle.
//
// Activity counters count lookups, trainings, updates skipped because the
// branch was filtered and predicted correctly, and weights written (h + 1 per
// training).
//
// The organisation (P tables, partial sums, checkpointed sums, gshare-indexed
// 5-bit bias, filtering rule) follows the modulo path-history / BBF scheme.
// The two-stage timing, the tag/commit interface, the read-port sharing for
// training and the counters are this design's own choices.
module pbnp_predictor #(
  parameter int unsigned PC_W         = pbnp_pkg::PC_W,
  parameter int unsigned PC_LSB       = pbnp_pkg::PC_LSB,
  parameter int unsigned HIST_LEN     = pbnp_pkg::HIST_LEN,
  parameter int unsigned PATH_LEN     = pbnp_pkg::PATH_LEN,
  parameter int unsigned WEIGHT_W     = pbnp_pkg::WEIGHT_W,
  parameter int unsigned BIAS_W       = pbnp_pkg::BIAS_W,
  parameter int unsigned ROWS         = pbnp_pkg::ROWS,
  parameter int unsigned BIAS_ENTRIES = pbnp_pkg::BIAS_ENTRIES,
  parameter int unsigned CKPT_ENTRIES = pbnp_pkg::CKPT_ENTRIES,
  parameter int unsigned SUM_W        = pbnp_pkg::SUM_W,
  parameter int unsigned THETA        = pbnp_pkg::train_threshold(HIST_LEN),
  localparam int unsigned TAG_W       = $clog2(CKPT_ENTRIES)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     init_done,
  // lookup request
  input  logic                     lk_valid,
  input  logic [PC_W-1:0]          lk_pc,
  output logic                     lk_ready,
  // prediction, one cycle after an accepted request
  output logic                     pr_valid,
  output logic                     pr_taken,
  output logic                     pr_filtered,
  output logic [TAG_W-1:0]         pr_tag,
  output logic signed [SUM_W-1:0]  pr_sum,
  // misprediction recovery
  input  logic                     rc_valid,
  input  logic [TAG_W-1:0]         rc_tag,
  input  logic                     rc_taken,
  // in-order commit of the oldest in-flight branch
  input  logic                     up_valid,
  input  logic                     up_taken,
  output logic                     up_ready,
  output logic [TAG_W:0]           inflight,
  // activity counters
  output logic [31:0]              cnt_lookups,
  output logic [31:0]              cnt_trained,
  output logic [31:0]              cnt_filter_skips,
  output logic [31:0]              cnt_weights_written
);

  localparam int unsigned NS     = PATH_LEN - 1;
  localparam int unsigned WPR    = pbnp_pkg::weights_per_row(HIST_LEN, PATH_LEN);
  localparam int unsigned IDX_W  = $clog2(ROWS);
  localparam int unsigned BIDX_W = $clog2(BIAS_ENTRIES);
  localparam int unsigned GX_W   = (BIDX_W < HIST_LEN) ? BIDX_W : HIST_LEN;

  typedef struct packed {
    logic [NS-1:0][SUM_W-1:0] alt_sums;   // partial sums for the other direction
    logic [HIST_LEN-1:0]      ghr;        // history before this branch
    logic [NS-1:0][IDX_W-1:0] path;       // row indices of the P-1 previous branches
    logic [IDX_W-1:0]         idx;        // row index of this branch
    logic [BIDX_W-1:0]        bidx;       // bias table index
    logic [SUM_W-1:0]         y;          // dot product at prediction
    logic                     pred;
    logic                     filtered;
  } ckpt_t;

  // ---------------------------------------------------------------- state
  logic                 s2_valid;
  logic [IDX_W-1:0]     s2_idx;
  logic [BIDX_W-1:0]    s2_bidx;
  logic [HIST_LEN-1:0]  ghr;
  logic [NS-1:0][IDX_W-1:0] path;

  // ---------------------------------------------------------------- wires
  logic                 lk_fire, s2_fire, pred, filtered;
  logic [IDX_W-1:0]     lk_idx;
  logic [BIDX_W-1:0]    lk_bidx;
  logic [HIST_LEN-1:0]  ghr_fwd;
  logic [TAG_W:0]       ck_count;
  logic                 ck_empty, ck_full;
  logic [TAG_W-1:0]     ck_head_tag;
  ckpt_t                ck_new, ck_head, ck_rc;
  logic                 upd_rd, upd_trained, upd_skipped, upd_train, upd_ready;
  logic [PATH_LEN-1:0][IDX_W-1:0] upd_rows, upd_rd_idx, wr_idx;
  logic [BIDX_W-1:0]    upd_rd_bidx, wr_bidx;
  logic                 wr_en, wr_bias_en;
  logic signed [BIAS_W-1:0] wr_bias;
  logic [PATH_LEN-1:0][WPR-1:0][WEIGHT_W-1:0] rows_rd, wr_rows;
  logic signed [BIAS_W-1:0] bias_rd;
  logic                 bias_sat;
  logic signed [SUM_W-1:0] y, c_own;
  logic [NS-1:0][SUM_W-1:0] c_pos, c_neg, alt_sums;

  // ---------------------------------------------------------------- stage 1
  assign lk_idx   = lk_pc[PC_LSB +: IDX_W];
  assign ghr_fwd  = s2_fire ? {ghr[HIST_LEN-2:0], pred} : ghr;
  assign lk_bidx  = lk_pc[PC_LSB +: BIDX_W] ^ BIDX_W'(ghr_fwd[GX_W-1:0]);
  assign lk_ready = init_done && !rc_valid && !upd_rd &&
                    ((ck_count + (TAG_W+1)'(s2_valid)) < (TAG_W+1)'(CKPT_ENTRIES));
  assign lk_fire  = lk_valid && lk_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_idx   <= '0;
      s2_bidx  <= '0;
    end else begin
      s2_valid <= lk_fire;
      if (lk_fire) begin
        s2_idx  <= lk_idx;
        s2_bidx <= lk_bidx;
      end
    end
  end

  // ---------------------------------------------------------------- tables
  for (genvar t = 0; t < PATH_LEN; t++) begin : g_tab
    pbnp_weight_table #(.ROWS(ROWS), .WPR(WPR), .WEIGHT_W(WEIGHT_W)) u_tab (
      .clk    (clk),
      .rd_en  (lk_fire || upd_rd),
      .rd_idx (upd_rd ? upd_rd_idx[t] : lk_idx),
      .rd_row (rows_rd[t]),
      .wr_en  (wr_en),
      .wr_idx (wr_idx[t]),
      .wr_row (wr_rows[t])
    );
  end

  pbnp_bias_table #(.ENTRIES(BIAS_ENTRIES), .BIAS_W(BIAS_W)) u_bias (
    .clk          (clk),
    .rd_en        (lk_fire || upd_rd),
    .rd_idx       (upd_rd ? upd_rd_bidx : lk_bidx),
    .rd_bias      (bias_rd),
    .rd_saturated (bias_sat),
    .wr_en        (wr_bias_en),
    .wr_idx       (wr_bidx),
    .wr_bias      (wr_bias)
  );

  // ---------------------------------------------------------------- stage 2
  // Table t < P was read for the branch t positions ahead: slot m multiplies
  // x_{t+mP} of that branch, i.e. this branch's outcome (m = 0) or
  // ghr[mP-1]. Table P serves this branch: slot m multiplies ghr[(m+1)P-1].
  for (genvar t = 1; t < PATH_LEN; t++) begin : g_ahead
    logic [WPR-1:0] sgn, used;
    logic signed [SUM_W-1:0] rest, w0;
    always_comb begin
      for (int m = 0; m < int'(WPR); m++) begin
        used[m] = (m > 0) && (t + m * PATH_LEN <= HIST_LEN);
        sgn[m]  = (m > 0 && m * PATH_LEN <= HIST_LEN) ? ghr[m*PATH_LEN-1] : 1'b0;
      end
    end
    pbnp_row_sum #(.WPR(WPR), .WEIGHT_W(WEIGHT_W), .SUM_W(SUM_W)) u_sum (
      .row (rows_rd[t-1]), .sign (sgn), .used (used), .sum (rest)
    );
    assign w0         = SUM_W'(signed'(rows_rd[t-1][0]));
    assign c_pos[t-1] = rest + w0;
    assign c_neg[t-1] = rest - w0;
  end

  logic [WPR-1:0] own_sgn, own_used;
  always_comb begin
    for (int m = 0; m < int'(WPR); m++) begin
      own_used[m] = ((m + 1) * PATH_LEN <= HIST_LEN);
      own_sgn[m]  = own_used[m] ? ghr[(m+1)*PATH_LEN-1] : 1'b0;
    end
  end

  pbnp_row_sum #(.WPR(WPR), .WEIGHT_W(WEIGHT_W), .SUM_W(SUM_W)) u_own_sum (
    .row (rows_rd[PATH_LEN-1]), .sign (own_sgn), .used (own_used), .sum (c_own)
  );

  assign s2_fire = s2_valid && !rc_valid;

  pbnp_sum_pipeline #(.PATH_LEN(PATH_LEN), .BIAS_W(BIAS_W), .SUM_W(SUM_W)) u_pipe (
    .clk          (clk),
    .rst_n        (rst_n),
    .bias         (bias_rd),
    .c_own        (c_own),
    .c_pos        (c_pos),
    .c_neg        (c_neg),
    .y            (y),
    .advance      (s2_fire),
    .pred         (pred),
    .alt_sums     (alt_sums),
    .sums         (),
    .restore      (rc_valid),
    .restore_sums (ck_rc.alt_sums)
  );

  pbnp_bbf #(.BIAS_W(BIAS_W), .SUM_W(SUM_W), .THETA(THETA)) u_bbf (
    .bias       (bias_rd),
    .bias_sat   (bias_sat),
    .y          (y),
    .pred_taken (pred),
    .filtered   (filtered),
    .u_filtered (ck_head.filtered),
    .u_pred     (ck_head.pred),
    .u_y        (ck_head.y),
    .u_taken    (up_taken),
    .u_train    (upd_train)
  );

  // After recovery the path is the recovered branch followed by its own
  // predecessors, the oldest one dropping out.
  logic [NS:0][IDX_W-1:0] rc_path;
  assign rc_path = {ck_rc.path, ck_rc.idx};

  pbnp_history #(.HIST_LEN(HIST_LEN), .PATH_LEN(PATH_LEN), .IDX_W(IDX_W)) u_hist (
    .clk          (clk),
    .rst_n        (rst_n),
    .push         (s2_fire),
    .push_taken   (pred),
    .push_idx     (s2_idx),
    .restore      (rc_valid),
    .restore_ghr  ({ck_rc.ghr[HIST_LEN-2:0], rc_taken}),
    .restore_path (rc_path[NS-1:0]),
    .ghr          (ghr),
    .path         (path)
  );

  always_comb begin
    ck_new.alt_sums = alt_sums;
    ck_new.ghr      = ghr;
    ck_new.path     = path;
    ck_new.idx      = s2_idx;
    ck_new.bidx     = s2_bidx;
    ck_new.y        = y;
    ck_new.pred     = pred;
    ck_new.filtered = filtered;
  end

  pbnp_checkpoint_table #(.ENTRIES(CKPT_ENTRIES), .DATA_W($bits(ckpt_t))) u_ckpt (
    .clk        (clk),
    .rst_n      (rst_n),
    .alloc      (s2_fire),
    .alloc_data (ck_new),
    .alloc_tag  (pr_tag),
    .free       (upd_trained || upd_skipped),
    .head_tag   (ck_head_tag),
    .head_data  (ck_head),
    .squash     (rc_valid),
    .squash_tag (rc_tag),
    .rd_tag     (rc_tag),
    .rd_data    (ck_rc),
    .count      (ck_count),
    .full       (ck_full),
    .empty      (ck_empty)
  );

  assign pr_valid    = s2_fire;
  assign pr_taken    = pred;
  assign pr_filtered = filtered;
  assign pr_sum      = y;
  assign inflight    = ck_count;

  // ---------------------------------------------------------------- update
  always_comb begin
    for (int t = 1; t < int'(PATH_LEN); t++) upd_rows[t-1] = ck_head.path[t-1];
    upd_rows[PATH_LEN-1] = ck_head.idx;
  end

  pbnp_update_unit #(
    .HIST_LEN(HIST_LEN), .PATH_LEN(PATH_LEN), .ROWS(ROWS),
    .BIAS_ENTRIES(BIAS_ENTRIES), .WEIGHT_W(WEIGHT_W), .BIAS_W(BIAS_W)
  ) u_upd (
    .clk         (clk),
    .rst_n       (rst_n),
    .init_done   (init_done),
    .up_valid    (up_valid && !ck_empty),
    .up_taken    (up_taken),
    .up_ready    (upd_ready),
    .train       (upd_train),
    .ghr         (ck_head.ghr),
    .rows        (upd_rows),
    .bias_idx    (ck_head.bidx),
    .trained     (upd_trained),
    .skipped     (upd_skipped),
    .rd_en       (upd_rd),
    .rd_idx      (upd_rd_idx),
    .rd_bias_idx (upd_rd_bidx),
    .rd_rows     (rows_rd),
    .rd_bias     (bias_rd),
    .wr_en       (wr_en),
    .wr_idx      (wr_idx),
    .wr_rows     (wr_rows),
    .wr_bias_en  (wr_bias_en),
    .wr_bias_idx (wr_bidx),
    .wr_bias     (wr_bias)
  );

  assign up_ready = upd_ready && !ck_empty;

  // ---------------------------------------------------------------- counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_lookups         <= '0;
      cnt_trained         <= '0;
      cnt_filter_skips    <= '0;
      cnt_weights_written <= '0;
    end else begin
      if (s2_fire)     cnt_lookups <= cnt_lookups + 1;
      if (upd_trained) begin
        cnt_trained         <= cnt_trained + 1;
        cnt_weights_written <= cnt_weights_written + 32'(HIST_LEN + 1);
      end
      if (upd_skipped && ck_head.filtered) cnt_filter_skips <= cnt_filter_skips + 1;
    end
  end

  // ---------------------------------------------------------------- checks
  a_rc_flips: assert property (@(posedge clk) disable iff (!rst_n)
    rc_valid |-> (rc_taken != ck_rc.pred));
  a_no_alloc_when_full: assert property (@(posedge clk) disable iff (!rst_n)
    s2_fire |-> !ck_full);
  a_rc_not_committing: assert property (@(posedge clk) disable iff (!rst_n)
    (rc_valid && up_valid && up_ready) |-> (rc_tag != ck_head_tag));

endmodule
