// pbnp_bias_table: the bias-weight SRAM array used by bias-based filtering.
//
// Each entry is a signed BIAS_W-bit bias weight w_0. The table is indexed in
// gshare fashion: the low address bits of the branch XOR the most recent
// global history outcomes (the index is formed by the caller, see
// pbnp_predictor). It has more entries than any weight table, so that it can
// track strongly biased branches as well as supply ordinary bias weights.
//
// The read port also reports whether the weight read is saturated at its
// largest or smallest value; such a branch counts as strongly biased.
//
// Timing: synchronous read, data and the saturation flag valid the cycle after
// rd_en and held until the next rd_en; a read of an entry written in the same
// cycle returns the old value. Contents are not reset; the update unit clears
// them after reset.
//
// The 5-bit width, the larger size, the gshare indexing and the saturation
// test follow the bias-based filtering scheme; the port timing is this
// design's own.
module pbnp_bias_table #(
  parameter int unsigned ENTRIES = pbnp_pkg::BIAS_ENTRIES,
  parameter int unsigned BIAS_W  = pbnp_pkg::BIAS_W,
  localparam int unsigned IDX_W  = $clog2(ENTRIES)
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [IDX_W-1:0]         rd_idx,
  output logic signed [BIAS_W-1:0] rd_bias,
  output logic                     rd_saturated,
  input  logic                     wr_en,
  input  logic [IDX_W-1:0]         wr_idx,
  input  logic signed [BIAS_W-1:0] wr_bias
);

  localparam logic signed [BIAS_W-1:0] BMAX = {1'b0, {(BIAS_W-1){1'b1}}};
  localparam logic signed [BIAS_W-1:0] BMIN = {1'b1, {(BIAS_W-1){1'b0}}};

  logic signed [BIAS_W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (rd_en) rd_bias <= mem[rd_idx];
    if (wr_en) mem[wr_idx] <= wr_bias;
  end

  assign rd_saturated = (rd_bias == BMAX) || (rd_bias == BMIN);

endmodule
