// pbnp_history: speculative global branch history and path history.
//
// ghr holds the h most recent predicted (or, after a recovery, corrected)
// branch outcomes, bit 0 being the most recent; 1 means taken. path holds the
// weight-table row indices of the P-1 most recent branches, entry 0 being the
// most recent. With modulo path-history only these P-1 addresses are kept,
// however long the outcome history is.
//
// Timing: push shifts in one branch (its outcome and row index) at the clock
// edge; restore loads a checkpointed state instead and takes precedence.
// Reset clears both to zero.
//
// Speculative update with restore on a misprediction follows the scheme;
// keeping row indices rather than full addresses is this design's choice.
module pbnp_history #(
  parameter int unsigned HIST_LEN = pbnp_pkg::HIST_LEN,
  parameter int unsigned PATH_LEN = pbnp_pkg::PATH_LEN,
  parameter int unsigned IDX_W    = $clog2(pbnp_pkg::ROWS),
  localparam int unsigned NS      = PATH_LEN - 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      push,
  input  logic                      push_taken,
  input  logic [IDX_W-1:0]          push_idx,
  input  logic                      restore,
  input  logic [HIST_LEN-1:0]       restore_ghr,
  input  logic [NS-1:0][IDX_W-1:0]  restore_path,
  output logic [HIST_LEN-1:0]       ghr,
  output logic [NS-1:0][IDX_W-1:0]  path
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghr  <= '0;
      path <= '0;
    end else if (restore) begin
      ghr  <= restore_ghr;
      path <= restore_path;
    end else if (push) begin
      ghr <= {ghr[HIST_LEN-2:0], push_taken};
      for (int d = int'(NS) - 1; d > 0; d--) path[d] <= path[d-1];
      path[0] <= push_idx;
    end
  end

endmodule
