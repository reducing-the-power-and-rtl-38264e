// pbnp_weight_table: one of the P weight SRAM arrays of the predictor.
//
// With modulo path-history every P-th weight is selected by the same branch
// address, so the weights are interleaved: a row of table t holds the
// WPR = ceil(h/P) weights w_t, w_{t+P}, w_{t+2P}, ... that one branch address
// selects. The array has one read port and one write port, so a lookup and an
// update can proceed in the same cycle.
//
// Timing: the read is synchronous. rd_row shows the row addressed by rd_idx in
// the cycle after rd_en, and holds it until the next rd_en. A read of the row
// being written in the same cycle returns the old contents. Contents are not
// reset; the update unit clears every row after reset.
//
// The interleaved rows and the one-read/one-write porting follow the modulo
// path-history scheme; the synchronous read and the row count are this
// design's own choices.
module pbnp_weight_table #(
  parameter int unsigned ROWS     = pbnp_pkg::ROWS,
  parameter int unsigned WPR      = pbnp_pkg::weights_per_row(pbnp_pkg::HIST_LEN, pbnp_pkg::PATH_LEN),
  parameter int unsigned WEIGHT_W = pbnp_pkg::WEIGHT_W,
  localparam int unsigned IDX_W   = $clog2(ROWS)
) (
  input  logic                           clk,
  input  logic                           rd_en,
  input  logic [IDX_W-1:0]               rd_idx,
  output logic [WPR-1:0][WEIGHT_W-1:0]   rd_row,
  input  logic                           wr_en,
  input  logic [IDX_W-1:0]               wr_idx,
  input  logic [WPR-1:0][WEIGHT_W-1:0]   wr_row
);

  logic [WPR-1:0][WEIGHT_W-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (rd_en) rd_row <= mem[rd_idx];
    if (wr_en) mem[wr_idx] <= wr_row;
  end

endmodule
