// tb_pbnp_sum_pipeline: self-checking test of the partial-sum pipeline with
// P = 4 (three partial sums). Random contributions and predictions drive it;
// a model keeps the partial sums as plain integers and checks y, the
// alternative sums and the registered sums each cycle. Restores load
// previously captured alternative sums; reset must clear.
module tb_pbnp_sum_pipeline;
  localparam int unsigned P = 4, NS = P - 1, BW = 5, SW = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic signed [BW-1:0] bias;
  logic signed [SW-1:0] c_own, y;
  logic [NS-1:0][SW-1:0] c_pos, c_neg, alt_sums, sums, restore_sums;
  logic advance, pred, restore;
  int checks = 0, failures = 0;
  int s [NS];

  pbnp_sum_pipeline #(.PATH_LEN(P), .BIAS_W(BW), .SUM_W(SW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sx(input logic [SW-1:0] v);
    return int'($signed(v));
  endfunction

  initial begin
    int ns [NS];
    int alt [NS];
    advance = 0; pred = 0; restore = 0; restore_sums = '0;
    bias = '0; c_own = '0; c_pos = '0; c_neg = '0;
    for (int d = 0; d < int'(NS); d++) s[d] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      bias  = BW'($urandom);
      c_own = SW'($signed(11'($urandom)));
      for (int d = 0; d < int'(NS); d++) begin
        c_pos[d] = SW'($signed(11'($urandom)));
        c_neg[d] = SW'($signed(11'($urandom)));
      end
      advance = ($urandom % 4) != 0;
      pred    = 1'($urandom);
      restore = ($urandom % 16) == 0;
      #1;
      checks++;
      if (sx(y) != int'(bias) + s[0] + int'(c_own)) begin
        failures++; $display("FAIL y n=%0d", n);
      end
      for (int d = 0; d < int'(NS); d++) begin
        int base;
        base   = (d + 1 < int'(NS)) ? s[d+1] : 0;
        ns[d]  = base + (pred ? sx(c_pos[d]) : sx(c_neg[d]));
        alt[d] = base + (pred ? sx(c_neg[d]) : sx(c_pos[d]));
        checks += 2;
        if (sx(alt_sums[d]) != alt[d]) begin failures++; $display("FAIL alt n=%0d d=%0d", n, d); end
        if (sx(sums[d]) != s[d]) begin failures++; $display("FAIL sums n=%0d d=%0d", n, d); end
      end
      @(posedge clk);
      if (restore) for (int d = 0; d < int'(NS); d++) s[d] = sx(restore_sums[d]);
      else if (advance) s = ns;
      @(negedge clk);
      // next restore value: the alternative sums of this cycle
      for (int d = 0; d < int'(NS); d++) restore_sums[d] = SW'(alt[d]);
    end
    rst_n = 1'b0;
    #1;
    checks++;
    if (sums != '0) begin failures++; $display("FAIL reset"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
