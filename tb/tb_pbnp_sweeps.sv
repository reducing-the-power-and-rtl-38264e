// tb_pbnp_sweeps: end-to-end test of the two design-space sweeps behind the
// modulo path-history and bias-based filtering choices, each point an
// instance of pbnp_predictor checked against its own processor model and
// reference (tb_pbnp_core_model). All points keep the 8KB history length
// h = 29 and 128 rows per weight table.
//   Weights per table: P = 29 (one weight per row, i.e. one table per
//   history position, the unmodified path-based organisation), P = 15
//   (h/2, two weights per row), P = 10 (h/3, three per row) and P = 4
//   (eight per row, the 8KB design point), with 4K bias weights.
//   Bias-table share: 1K, 2K and 4K bias weights (1/8, 1/4 and 1/2 of an
//   8KB budget counted in entries) at P = 4.
// The P = 4 / 4K point appears once. Every point must filter at least one
// branch, train, recover and stall, as the core model counts.
module tb_pbnp_sweeps;
  localparam int NCFG = 6;
  localparam int unsigned CH  [NCFG] = '{29, 29, 29, 29, 29, 29};
  localparam int unsigned CP  [NCFG] = '{29, 15, 10, 4, 4, 4};
  localparam int unsigned CBE [NCFG] = '{4096, 4096, 4096, 4096, 2048, 1024};
  localparam int unsigned ROWS = 128, CKPT = 32, TW = 5, SW = 16;

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
      .HIST_LEN(CH[c]), .PATH_LEN(CP[c]), .ROWS(ROWS), .BIAS_ENTRIES(CBE[c]),
      .CKPT_ENTRIES(CKPT)
    ) dut (.*);

    tb_pbnp_core_model #(
      .H(CH[c]), .P(CP[c]), .ROWS(ROWS), .BE(CBE[c]), .CKPT(CKPT),
      .THETA(pbnp_pkg::train_threshold(CH[c])), .NBR(12000), .SEED(31 + c),
      .REQ_FILTER(1'b1)
    ) core (.*, .done(done[c]));

    assign chk_v[c]  = checks;
    assign fail_v[c] = failures;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (300000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_v.sum(), fail_v.sum() + 1);
    $finish;
  end

  initial begin
    @(posedge rst_n);
    wait (&done);
    for (int c = 0; c < NCFG; c++)
      $display("sweep point h=%0d P=%0d bias=%0d: checks=%0d failures=%0d", CH[c], CP[c], CBE[c], chk_v[c], fail_v[c]);
    $display("TB_RESULT checks=%0d failures=%0d", chk_v.sum(), fail_v.sum());
    $finish;
  end
endmodule
