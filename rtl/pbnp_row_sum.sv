// pbnp_row_sum: adds the weights of one table row, each multiplied by a
// branch outcome represented as +1 (taken) or -1 (not taken).
//
// This is the per-table slice of the perceptron dot product w . x. Slot m of
// the row is added when sign[m] is 1 and subtracted when it is 0; slots whose
// bit in used is 0 (weights beyond the history length when h is not a
// multiple of P) contribute nothing. Purely combinational.
//
// The dot-product slice follows the scheme; the plain adder chain and the
// 16-bit sum width are this design's own choices.
module pbnp_row_sum #(
  parameter int unsigned WPR      = pbnp_pkg::weights_per_row(pbnp_pkg::HIST_LEN, pbnp_pkg::PATH_LEN),
  parameter int unsigned WEIGHT_W = pbnp_pkg::WEIGHT_W,
  parameter int unsigned SUM_W    = pbnp_pkg::SUM_W
) (
  input  logic [WPR-1:0][WEIGHT_W-1:0] row,
  input  logic [WPR-1:0]               sign,
  input  logic [WPR-1:0]               used,
  output logic signed [SUM_W-1:0]      sum
);

  always_comb begin
    logic signed [SUM_W-1:0] w;
    sum = '0;
    for (int m = 0; m < int'(WPR); m++) begin
      w = SUM_W'(signed'(row[m]));
      if (used[m]) sum = sign[m] ? sum + w : sum - w;
    end
  end

endmodule
