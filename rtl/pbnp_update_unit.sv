// pbnp_update_unit: the update phase of the predictor, plus the clearing of
// all tables after reset.
//
// When the oldest in-flight branch commits (up_valid with its outcome
// up_taken) the unit either retires it at once or trains it, as decided by
// the bias-based filter (train). Training is a read-modify-write of every
// row the branch used: row rows[t-1] of weight table t (t = 1..P) and entry
// bias_idx of the bias table.
//   cycle 1 (IDLE, accepted): rd_en reads all those rows through the tables'
//            read ports; the lookup path is stalled for this cycle.
//   cycle 2 (WRITE): each weight w_i moves one step towards agreement,
//            +1 when x_i (ghr[i-1]) equals the outcome and -1 otherwise;
//            the bias moves +1 for taken, -1 for not taken. All saturate at
//            their signed limits. The rows are written back; up_ready is low.
// So a trained branch costs two cycles and one lookup slot; a branch that is
// not trained costs one cycle and no table access.
//
// After reset the unit spends max(ROWS, BIAS_ENTRIES) cycles writing zero
// into every row, then raises init_done. Weight slots beyond the history
// length (when h is not a multiple of P) are never changed.
//
// Skipping the update of a correctly predicted filtered branch follows the
// scheme. The read-port sharing, the +/-1 saturating rule and the clearing
// sweep are this design's own choices.
module pbnp_update_unit #(
  parameter int unsigned HIST_LEN     = pbnp_pkg::HIST_LEN,
  parameter int unsigned PATH_LEN     = pbnp_pkg::PATH_LEN,
  parameter int unsigned ROWS         = pbnp_pkg::ROWS,
  parameter int unsigned BIAS_ENTRIES = pbnp_pkg::BIAS_ENTRIES,
  parameter int unsigned WEIGHT_W     = pbnp_pkg::WEIGHT_W,
  parameter int unsigned BIAS_W       = pbnp_pkg::BIAS_W,
  localparam int unsigned WPR         = pbnp_pkg::weights_per_row(HIST_LEN, PATH_LEN),
  localparam int unsigned IDX_W       = $clog2(ROWS),
  localparam int unsigned BIDX_W      = $clog2(BIAS_ENTRIES)
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  output logic                                      init_done,
  // committing branch
  input  logic                                      up_valid,
  input  logic                                      up_taken,
  output logic                                      up_ready,
  input  logic                                      train,
  input  logic [HIST_LEN-1:0]                       ghr,
  input  logic [PATH_LEN-1:0][IDX_W-1:0]            rows,
  input  logic [BIDX_W-1:0]                         bias_idx,
  output logic                                      trained,   // pulse: a training was started
  output logic                                      skipped,   // pulse: a branch retired untrained
  // table read request (shares the lookup read ports)
  output logic                                      rd_en,
  output logic [PATH_LEN-1:0][IDX_W-1:0]            rd_idx,
  output logic [BIDX_W-1:0]                         rd_bias_idx,
  input  logic [PATH_LEN-1:0][WPR-1:0][WEIGHT_W-1:0] rd_rows,
  input  logic signed [BIAS_W-1:0]                  rd_bias,
  // table write ports
  output logic                                      wr_en,
  output logic [PATH_LEN-1:0][IDX_W-1:0]            wr_idx,
  output logic [PATH_LEN-1:0][WPR-1:0][WEIGHT_W-1:0] wr_rows,
  output logic                                      wr_bias_en,
  output logic [BIDX_W-1:0]                         wr_bias_idx,
  output logic signed [BIAS_W-1:0]                  wr_bias
);

  typedef enum logic [1:0] {S_INIT, S_IDLE, S_WRITE} state_t;

  localparam int unsigned SWEEP   = (ROWS > BIAS_ENTRIES) ? ROWS : BIAS_ENTRIES;
  localparam int unsigned SWEEP_W = $clog2(SWEEP);
  localparam logic signed [WEIGHT_W-1:0] WMAX = {1'b0, {(WEIGHT_W-1){1'b1}}};
  localparam logic signed [WEIGHT_W-1:0] WMIN = {1'b1, {(WEIGHT_W-1){1'b0}}};
  localparam logic signed [BIAS_W-1:0]   BMAX = {1'b0, {(BIAS_W-1){1'b1}}};
  localparam logic signed [BIAS_W-1:0]   BMIN = {1'b1, {(BIAS_W-1){1'b0}}};

  state_t                         state_q;
  logic [SWEEP_W-1:0]             sweep_q;
  logic [HIST_LEN-1:0]            ghr_q;
  logic                           taken_q;
  logic [PATH_LEN-1:0][IDX_W-1:0] rows_q;
  logic [BIDX_W-1:0]              bidx_q;
  logic                           accept;

  assign init_done = (state_q != S_INIT);
  assign up_ready  = (state_q == S_IDLE);
  assign accept    = up_valid && up_ready;
  assign trained   = accept && train;
  assign skipped   = accept && !train;
  assign rd_en       = trained;
  assign rd_idx      = rows;
  assign rd_bias_idx = bias_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_INIT;
      sweep_q <= '0;
      ghr_q   <= '0;
      taken_q <= 1'b0;
      rows_q  <= '0;
      bidx_q  <= '0;
    end else begin
      unique case (state_q)
        S_INIT: begin
          sweep_q <= sweep_q + 1'b1;
          if (sweep_q == SWEEP_W'(SWEEP - 1)) state_q <= S_IDLE;
        end
        S_IDLE: if (trained) begin
          ghr_q   <= ghr;
          taken_q <= up_taken;
          rows_q  <= rows;
          bidx_q  <= bias_idx;
          state_q <= S_WRITE;
        end
        S_WRITE: state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // New weights, from the rows read in the accepting cycle.
  logic [PATH_LEN-1:0][WPR-1:0][WEIGHT_W-1:0] new_rows;
  logic signed [BIAS_W-1:0]                   new_bias;

  always_comb begin
    logic signed [WEIGHT_W-1:0] w;
    int unsigned i;
    for (int t = 1; t <= int'(PATH_LEN); t++) begin
      for (int m = 0; m < int'(WPR); m++) begin
        i = t + m * PATH_LEN;
        w = signed'(rd_rows[t-1][m]);
        if (i <= HIST_LEN) begin
          if (ghr_q[i-1] == taken_q) begin
            if (w != WMAX) w = w + 1'b1;
          end else begin
            if (w != WMIN) w = w - 1'b1;
          end
        end
        new_rows[t-1][m] = w;
      end
    end
    new_bias = rd_bias;
    if (taken_q) begin
      if (rd_bias != BMAX) new_bias = rd_bias + 1'b1;
    end else begin
      if (rd_bias != BMIN) new_bias = rd_bias - 1'b1;
    end
  end

  always_comb begin
    if (state_q == S_INIT) begin
      wr_en       = ({1'b0, sweep_q} < (SWEEP_W+1)'(ROWS));
      wr_bias_en  = ({1'b0, sweep_q} < (SWEEP_W+1)'(BIAS_ENTRIES));
      for (int t = 0; t < int'(PATH_LEN); t++) wr_idx[t] = IDX_W'(sweep_q);
      wr_rows     = '0;
      wr_bias_idx = BIDX_W'(sweep_q);
      wr_bias     = '0;
    end else begin
      wr_en       = (state_q == S_WRITE);
      wr_bias_en  = (state_q == S_WRITE);
      wr_idx      = rows_q;
      wr_rows     = new_rows;
      wr_bias_idx = bidx_q;
      wr_bias     = new_bias;
    end
  end

endmodule
