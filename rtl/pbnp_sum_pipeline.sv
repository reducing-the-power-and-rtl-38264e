// pbnp_sum_pipeline: the partial-sum pipeline of the predictor and its final
// adder.
//
// With a path history of P addresses the pipeline holds P-1 partial sums:
// S[d] (d = 1..P-1) is the part of the dot product already gathered for the
// branch that will be predicted d branches from now. When a branch is
// predicted, table t (t < P) has supplied a row for the branch t positions
// ahead; its contribution c_pos[t] (this branch taken) or c_neg[t] (not taken)
// is added while the sums shift one stage:
//     S'[d] = S[d+1] + c[d],   S'[P-1] = c[P-1].
// The sums for the opposite direction are produced at the same time
// (alt_sums) so that they can be checkpointed and restored after a
// misprediction without recomputation.
//
// The final adder forms y = bias + S[1] + c_own, where c_own is the
// contribution of table P, indexed by the branch being predicted.
//
// Timing: y is combinational from the inputs and the registers; on advance
// the registers take the sums chosen by pred. restore loads restore_sums and
// takes precedence over advance. Reset clears all sums. Requires P >= 2.
//
// The P-1 partial sums and their restore from a checkpoint follow the
// scheme; forming the opposite-direction sums alongside is this design's
// own choice.
module pbnp_sum_pipeline #(
  parameter int unsigned PATH_LEN = pbnp_pkg::PATH_LEN,
  parameter int unsigned BIAS_W   = pbnp_pkg::BIAS_W,
  parameter int unsigned SUM_W    = pbnp_pkg::SUM_W,
  localparam int unsigned NS      = PATH_LEN - 1
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic signed [BIAS_W-1:0]      bias,
  input  logic signed [SUM_W-1:0]       c_own,
  input  logic [NS-1:0][SUM_W-1:0]      c_pos,    // [d-1] holds c_pos[d]
  input  logic [NS-1:0][SUM_W-1:0]      c_neg,
  output logic signed [SUM_W-1:0]       y,
  input  logic                          advance,
  input  logic                          pred,
  output logic [NS-1:0][SUM_W-1:0]      alt_sums,
  output logic [NS-1:0][SUM_W-1:0]      sums,
  input  logic                          restore,
  input  logic [NS-1:0][SUM_W-1:0]      restore_sums
);

  logic [NS-1:0][SUM_W-1:0] s_q, s_next;

  assign sums = s_q;
  assign y    = SUM_W'(bias) + signed'(s_q[0]) + c_own;

  always_comb begin
    logic [SUM_W-1:0] base;
    for (int d = 0; d < int'(NS); d++) begin
      base        = (d + 1 < int'(NS)) ? s_q[d+1] : '0;
      s_next[d]   = base + (pred ? c_pos[d] : c_neg[d]);
      alt_sums[d] = base + (pred ? c_neg[d] : c_pos[d]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       s_q <= '0;
    else if (restore) s_q <= restore_sums;
    else if (advance) s_q <= s_next;
  end

endmodule
