// tb_pbnp_bias_table: self-checking test of the bias-weight array. Writes
// random five-bit weights (including both saturated values), reads them back
// one cycle later and checks the saturation flag against the range limits.
module tb_pbnp_bias_table;
  localparam int unsigned ENTRIES = 64, BW = 5;
  logic clk = 1'b0;
  logic rd_en = 1'b0, wr_en = 1'b0;
  logic [5:0] rd_idx = '0, wr_idx = '0;
  logic signed [BW-1:0] rd_bias, wr_bias = '0;
  logic rd_saturated;
  logic signed [BW-1:0] model [ENTRIES];
  int checks = 0, failures = 0, nsat = 0;

  pbnp_bias_table #(.ENTRIES(ENTRIES), .BIAS_W(BW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    for (int e = 0; e < int'(ENTRIES); e++) begin
      wr_en = 1'b1; wr_idx = 6'(e);
      case (e % 8)
        0: wr_bias = 5'sd15;
        1: wr_bias = -5'sd16;
        2: wr_bias = 5'sd14;
        3: wr_bias = -5'sd15;
        default: wr_bias = 5'($urandom);
      endcase
      model[e] = wr_bias;
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int e = 0; e < int'(ENTRIES); e++) begin
      logic exp_sat;
      rd_en = 1'b1; rd_idx = 6'(e);
      @(negedge clk);
      exp_sat = (model[e] == 15) || (model[e] == -16);
      if (exp_sat) nsat++;
      checks += 2;
      if (rd_bias !== model[e]) begin failures++; $display("FAIL bias %0d: %0d vs %0d", e, rd_bias, model[e]); end
      if (rd_saturated !== exp_sat) begin failures++; $display("FAIL sat %0d", e); end
    end
    checks++;
    if (nsat < 16) begin failures++; $display("FAIL too few saturated entries"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
