// tb_pbnp_bbf: self-checking test of the bias-based filter. Sweeps every
// bias weight, a range of dot products around zero and around the training
// threshold, and checks prediction, filtering and the training decision.
module tb_pbnp_bbf;
  localparam int unsigned BW = 5, SW = 16, TH = 112;
  logic signed [BW-1:0] bias;
  logic bias_sat, pred_taken, filtered;
  logic signed [SW-1:0] y, u_y;
  logic u_filtered, u_pred, u_taken, u_train;
  int checks = 0, failures = 0;

  pbnp_bbf #(.BIAS_W(BW), .SUM_W(SW), .THETA(TH)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = -16; b <= 15; b++) begin
      for (int v = -300; v <= 300; v += 7) begin
        logic sat, ep;
        bias = BW'(b); y = SW'(v);
        sat = (b == 15) || (b == -16);
        bias_sat = sat;
        #1;
        ep = sat ? (b >= 0) : (v >= 0);
        checks++;
        if (pred_taken !== ep || filtered !== sat) begin
          failures++;
          $display("FAIL lookup b=%0d y=%0d pred=%b filt=%b", b, v, pred_taken, filtered);
        end
      end
    end
    for (int v = -200; v <= 200; v++) begin
      for (int k = 0; k < 8; k++) begin
        logic et;
        u_y = SW'(v); u_filtered = k[0]; u_pred = k[1]; u_taken = k[2];
        #1;
        if (k[0]) et = (k[1] != k[2]);
        else      et = (k[1] != k[2]) || (v <= int'(TH) && v >= -int'(TH));
        checks++;
        if (u_train !== et) begin
          failures++;
          $display("FAIL update y=%0d k=%0d train=%b", v, k, u_train);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
