// tb_pbnp_row_sum: self-checking test of the signed row adder. Random rows,
// outcome signs and slot masks, plus the all-extreme rows, compared with a
// sum computed in integers.
module tb_pbnp_row_sum;
  localparam int unsigned WPR = 14, WW = 8, SW = 16;
  logic [WPR-1:0][WW-1:0] row;
  logic [WPR-1:0] sign, used;
  logic signed [SW-1:0] sum;
  int checks = 0, failures = 0;

  pbnp_row_sum #(.WPR(WPR), .WEIGHT_W(WW), .SUM_W(SW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      int exp;
      for (int m = 0; m < int'(WPR); m++) row[m] = 8'($urandom);
      sign = 14'($urandom);
      used = (n % 4 == 0) ? '1 : 14'($urandom);
      if (n == 1) begin row = {WPR{8'h80}}; sign = '0; used = '1; end
      if (n == 2) begin row = {WPR{8'h80}}; sign = '1; used = '1; end
      if (n == 3) begin row = {WPR{8'h7f}}; sign = '1; used = '1; end
      #1;
      exp = 0;
      for (int m = 0; m < int'(WPR); m++)
        if (used[m]) exp += (sign[m] ? 1 : -1) * int'($signed(row[m]));
      checks++;
      if (int'(sum) != exp) begin
        failures++;
        $display("FAIL n=%0d sum=%0d exp=%0d", n, sum, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
