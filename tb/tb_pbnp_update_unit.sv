// tb_pbnp_update_unit: self-checking test of the update phase and of the
// table clearing after reset. Small tables (h = 10, P = 3, so some row slots
// are unused; 4-bit weights and 3-bit biases so that saturation is reached)
// are modelled as arrays that the unit reads and writes through its ports.
// An independent reference applies the training rule at each accepted
// commit; the arrays written by the unit must match it. Also checks the
// clearing time, the two-cycle training (up_ready low in the second cycle)
// and that untrained commits touch no table.
module tb_pbnp_update_unit;
  localparam int unsigned H = 10, P = 3, ROWS = 8, BE = 16, WW = 4, BW = 3;
  localparam int unsigned WPR = (H + P - 1) / P, IW = 3, BIW = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic init_done, up_valid, up_taken, up_ready, train, trained, skipped;
  logic [H-1:0] ghr;
  logic [P-1:0][IW-1:0] rows, rd_idx, wr_idx;
  logic [BIW-1:0] bias_idx, rd_bias_idx, wr_bias_idx;
  logic rd_en, wr_en, wr_bias_en;
  logic [P-1:0][WPR-1:0][WW-1:0] rd_rows, wr_rows;
  logic signed [BW-1:0] rd_bias, wr_bias;

  pbnp_update_unit #(.HIST_LEN(H), .PATH_LEN(P), .ROWS(ROWS), .BIAS_ENTRIES(BE),
                     .WEIGHT_W(WW), .BIAS_W(BW)) dut (.*);

  // tables driven by the unit
  logic [WPR-1:0][WW-1:0] tab [P][ROWS];
  logic signed [BW-1:0]   btab [BE];
  // reference
  int rtab [P][ROWS][WPR];
  int rbias [BE];
  int checks = 0, failures = 0, ntrain = 0, nskip = 0, nsat = 0, wr_cycles = 0;

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rd_en) begin
      for (int t = 0; t < int'(P); t++) rd_rows[t] <= tab[t][rd_idx[t]];
      rd_bias <= btab[rd_bias_idx];
    end
    if (wr_en) for (int t = 0; t < int'(P); t++) tab[t][wr_idx[t]] <= wr_rows[t];
    if (wr_bias_en) btab[wr_bias_idx] <= wr_bias;
    if (wr_en || wr_bias_en) wr_cycles <= wr_cycles + 1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic int sat_step(input int w, input int d, input int lo, input int hi);
    w += d;
    if (w > hi) w = hi;
    if (w < lo) w = lo;
    return w;
  endfunction

  task automatic compare_tables(input string what);
    for (int t = 0; t < int'(P); t++)
      for (int r = 0; r < int'(ROWS); r++)
        for (int m = 0; m < int'(WPR); m++)
          chk(int'($signed(tab[t][r][m])) == rtab[t][r][m], what);
    for (int e = 0; e < int'(BE); e++) chk(int'(btab[e]) == rbias[e], what);
  endtask

  initial begin
    int cycles, wc0;
    // arrays start with garbage
    for (int t = 0; t < int'(P); t++)
      for (int r = 0; r < int'(ROWS); r++) begin
        tab[t][r] = (WPR*WW)'($urandom);
        for (int m = 0; m < int'(WPR); m++) rtab[t][r][m] = 0;
      end
    for (int e = 0; e < int'(BE); e++) begin btab[e] = BW'($urandom); rbias[e] = 0; end
    up_valid = 0; up_taken = 0; train = 0; ghr = '0; rows = '0; bias_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cycles = 0;
    while (!init_done) begin @(negedge clk); cycles++; end
    chk(cycles == int'(BE), "clearing takes max(ROWS, BIAS_ENTRIES) cycles");
    compare_tables("cleared");
    for (int n = 0; n < 1500; n++) begin
      up_valid = ($urandom % 4) != 0;
      train    = ($urandom % 3) != 0;
      up_taken = ($urandom % 4) != 0;    // mostly taken: drives weights to saturation
      ghr      = (n % 2 == 1) ? '1 : H'($urandom);
      for (int t = 0; t < int'(P); t++) rows[t] = IW'($urandom % 3);
      bias_idx = BIW'($urandom % 4);
      #1;
      if (up_valid && up_ready) begin
        wc0 = wr_cycles;
        if (train) begin
          ntrain++;
          for (int t = 1; t <= int'(P); t++)
            for (int m = 0; m < int'(WPR); m++) begin
              int i;
              i = t + m * int'(P);
              if (i <= int'(H)) begin
                int old;
                old = rtab[t-1][rows[t-1]][m];
                rtab[t-1][rows[t-1]][m] = sat_step(old, (ghr[i-1] == up_taken) ? 1 : -1, -8, 7);
                if (old == rtab[t-1][rows[t-1]][m]) nsat++;
              end
            end
          rbias[bias_idx] = sat_step(rbias[bias_idx], up_taken ? 1 : -1, -4, 3);
          chk(rd_en && trained && !skipped, "training starts with a read");
          @(negedge clk);
          chk(!up_ready, "busy in the write cycle");
          up_valid = 0;
          @(negedge clk);
          chk(wr_cycles == wc0 + 1, "one write cycle per training");
        end else begin
          nskip++;
          chk(!rd_en && skipped && !trained, "untrained commit reads nothing");
          @(negedge clk);
          chk(wr_cycles == wc0, "untrained commit writes nothing");
        end
      end else begin
        @(negedge clk);
      end
      if (n % 100 == 99) compare_tables("trained");
    end
    compare_tables("final");
    chk(ntrain > 100 && nskip > 100 && nsat > 0, "all cases exercised");
    $display("trained=%0d skipped=%0d saturated=%0d", ntrain, nskip, nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
