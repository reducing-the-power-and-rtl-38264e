// tb_pbnp_configs: end-to-end test of the other predictor sizes of the
// modulo path-history / bias-based filtering family, each an instance of
// pbnp_predictor with its own parameters and its own processor model and
// reference (tb_pbnp_core_model):
//   2KB: h = 17, P = 4,  1K bias weights,   64 rows
//   4KB: h = 24, P = 4,  2K bias weights,   64 rows
//   8KB: h = 29, P = 4,  4K bias weights,  128 rows
//  16KB: h = 33, P = 5,  8K bias weights,  256 rows
//  64KB: h = 42, P = 3, 32K bias weights, 1024 rows
// Histories that are not a multiple of P leave unused slots in some rows.
// Row counts are the largest power of two within each storage budget.
// At 2KB the 17 weights carry |y| past the training threshold before any
// bias weight saturates on this program, so filtering is not required there.
module tb_pbnp_configs;
  localparam int NCFG = 5;
  localparam int unsigned CH  [NCFG] = '{17, 24, 29, 33, 42};
  localparam int unsigned CP  [NCFG] = '{4, 4, 4, 5, 3};
  localparam int unsigned CBE [NCFG] = '{1024, 2048, 4096, 8192, 32768};
  localparam int unsigned CR  [NCFG] = '{64, 64, 128, 256, 1024};
  localparam int unsigned CKPT = 32, TW = 5, SW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  logic [NCFG-1:0] done;
  int chk_v [NCFG];
  int fail_v [NCFG];

  always #5 clk = ~clk;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic init_done, lk_valid, lk_ready, pr_valid, pr_taken, pr_filtered;
    logic [31:0] lk_pc;
    logic [TW-1:0] pr_tag, rc_tag;
    logic signed [SW-1:0] pr_sum;
    logic rc_valid, rc_taken, up_valid, up_taken, up_ready;
    logic [TW:0] inflight;
    logic [31:0] cnt_lookups, cnt_trained, cnt_filter_skips, cnt_weights_written;
    int checks, failures;

    pbnp_predictor #(
      .HIST_LEN(CH[c]), .PATH_LEN(CP[c]), .ROWS(CR[c]), .BIAS_ENTRIES(CBE[c]),
      .CKPT_ENTRIES(CKPT)
    ) dut (.*);

    tb_pbnp_core_model #(
      .H(CH[c]), .P(CP[c]), .ROWS(CR[c]), .BE(CBE[c]), .CKPT(CKPT),
      .THETA(pbnp_pkg::train_threshold(CH[c])), .NBR(16000), .SEED(11 + c),
      .REQ_FILTER(c != 0)
    ) core (.*, .done(done[c]));

    assign chk_v[c]  = checks;
    assign fail_v[c] = failures;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_v.sum(), fail_v.sum() + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (&done);
    for (int c = 0; c < NCFG; c++)
      $display("config h=%0d P=%0d bias=%0d: checks=%0d failures=%0d", CH[c], CP[c], CBE[c], chk_v[c], fail_v[c]);
    $display("TB_RESULT checks=%0d failures=%0d", chk_v.sum(), fail_v.sum());
    $finish;
  end
endmodule
