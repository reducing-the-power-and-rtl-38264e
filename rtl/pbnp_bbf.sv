// pbnp_bbf: bias-based filtering (BBF) decisions.
//
// Lookup side: a branch whose bias weight is saturated (at its largest or
// smallest value) is treated as strongly biased; its prediction is the sign
// of the bias weight alone and the dot product is ignored. Any other branch
// is predicted taken when the dot product y is >= 0.
//
// Update side: a filtered branch that was predicted correctly skips the
// update phase entirely, which is the power saving of BBF. A filtered branch
// that mispredicted is trained. An unfiltered branch follows the perceptron
// rule: train on a misprediction or when |y| <= THETA.
//
// Both sides are purely combinational and independent of each other.
//
// Prediction by a saturated bias and skipping the update of a correct
// filtered branch follow the scheme. Training a mispredicted filtered branch
// in full and the threshold rule for the others are this design's choices.
module pbnp_bbf #(
  parameter int unsigned BIAS_W = pbnp_pkg::BIAS_W,
  parameter int unsigned SUM_W  = pbnp_pkg::SUM_W,
  parameter int unsigned THETA  = pbnp_pkg::train_threshold(pbnp_pkg::HIST_LEN)
) (
  // lookup side
  input  logic signed [BIAS_W-1:0] bias,
  input  logic                     bias_sat,
  input  logic signed [SUM_W-1:0]  y,
  output logic                     pred_taken,
  output logic                     filtered,
  // update side
  input  logic                     u_filtered,
  input  logic                     u_pred,
  input  logic signed [SUM_W-1:0]  u_y,
  input  logic                     u_taken,
  output logic                     u_train
);

  localparam logic signed [SUM_W-1:0] TH = SUM_W'(THETA);

  logic signed [SUM_W-1:0] u_mag;

  always_comb begin
    filtered   = bias_sat;
    pred_taken = bias_sat ? (bias >= 0) : (y >= 0);
  end

  always_comb begin
    u_mag = (u_y < 0) ? -u_y : u_y;
    if (u_filtered) u_train = (u_pred != u_taken);
    else            u_train = (u_pred != u_taken) || (u_mag <= TH);
  end

endmodule
