// tb_pbnp_predictor: end-to-end test of pbnp_predictor at its default size
// (h = 42, P = 3, 512-row weight tables, 16K bias weights, 32 checkpoints).
// Runs the table clearing and 20000 correct-path branches of a synthetic
// program through the processor model and reference of tb_pbnp_core_model.
module tb_pbnp_predictor;
  localparam int unsigned TW = $clog2(pbnp_pkg::CKPT_ENTRIES);
  logic clk = 1'b0, rst_n = 1'b0;
  logic init_done, lk_valid, lk_ready, pr_valid, pr_taken, pr_filtered;
  logic [pbnp_pkg::PC_W-1:0] lk_pc;
  logic [TW-1:0] pr_tag, rc_tag;
  logic signed [pbnp_pkg::SUM_W-1:0] pr_sum;
  logic rc_valid, rc_taken, up_valid, up_taken, up_ready;
  logic [TW:0] inflight;
  logic [31:0] cnt_lookups, cnt_trained, cnt_filter_skips, cnt_weights_written;
  logic done;
  int checks, failures;

  pbnp_predictor dut (.*);

  tb_pbnp_core_model #(
    .PC_W(pbnp_pkg::PC_W), .H(pbnp_pkg::HIST_LEN), .P(pbnp_pkg::PATH_LEN),
    .WW(pbnp_pkg::WEIGHT_W), .BW(pbnp_pkg::BIAS_W), .ROWS(pbnp_pkg::ROWS),
    .BE(pbnp_pkg::BIAS_ENTRIES), .CKPT(pbnp_pkg::CKPT_ENTRIES), .SW(pbnp_pkg::SUM_W),
    .THETA(pbnp_pkg::train_threshold(pbnp_pkg::HIST_LEN)), .NBR(20000), .SEED(7)
  ) core (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
