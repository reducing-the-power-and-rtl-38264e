// tb_pbnp_weight_table: self-checking test of one weight SRAM array.
// Fills every row with random data, reads it back with a one-cycle latency,
// checks that a read of a row written in the same cycle returns the old row
// and that the output holds while rd_en is low, then runs random traffic on
// both ports.
module tb_pbnp_weight_table;
  localparam int unsigned ROWS = 16, WPR = 5, WW = 8;
  logic clk = 1'b0;
  logic rd_en = 1'b0, wr_en = 1'b0;
  logic [3:0] rd_idx = '0, wr_idx = '0;
  logic [WPR-1:0][WW-1:0] rd_row, wr_row = '0;
  logic [WPR-1:0][WW-1:0] model [ROWS];
  int checks = 0, failures = 0;

  pbnp_weight_table #(.ROWS(ROWS), .WPR(WPR), .WEIGHT_W(WW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [WPR-1:0][WW-1:0] exp, input string what);
    checks++;
    if (rd_row !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, rd_row, exp);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int r = 0; r < int'(ROWS); r++) begin
      wr_en = 1'b1; wr_idx = 4'(r);
      for (int m = 0; m < int'(WPR); m++) wr_row[m] = 8'($urandom);
      model[r] = wr_row;
      @(negedge clk);
    end
    wr_en = 1'b0;
    for (int r = ROWS - 1; r >= 0; r--) begin
      rd_en = 1'b1; rd_idx = 4'(r);
      @(negedge clk);
      check(model[r], "readback");
    end
    // random traffic on both ports
    for (int n = 0; n < 500; n++) begin
      logic [WPR-1:0][WW-1:0] exp;
      rd_en = 1'($urandom); rd_idx = 4'($urandom);
      wr_en = 1'($urandom); wr_idx = 4'($urandom);
      for (int m = 0; m < int'(WPR); m++) wr_row[m] = 8'($urandom);
      exp = rd_en ? model[rd_idx] : rd_row;
      if (wr_en) model[wr_idx] = wr_row;
      @(negedge clk);
      check(exp, "random traffic");
    end
    wr_en = 1'b0;
    // read and write of the same row in one cycle: old data comes out
    rd_en = 1'b1; rd_idx = 4'd7; wr_en = 1'b1; wr_idx = 4'd7;
    for (int m = 0; m < int'(WPR); m++) wr_row[m] = 8'($urandom);
    @(negedge clk);
    check(model[7], "read during write");
    model[7] = wr_row;
    wr_en = 1'b0;
    @(negedge clk);
    check(model[7], "new data after write");
    // output holds without rd_en
    rd_en = 1'b0; rd_idx = 4'd3;
    repeat (3) @(negedge clk);
    check(model[7], "hold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
