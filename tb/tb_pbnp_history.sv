// tb_pbnp_history: self-checking test of the speculative global history and
// path history registers (h = 42, P = 3). Random pushes and restores are
// mirrored by a queue model; the register contents are compared every cycle.
module tb_pbnp_history;
  localparam int unsigned H = 42, P = 3, NS = P - 1, IW = 9;
  logic clk = 1'b0, rst_n = 1'b0;
  logic push, push_taken, restore;
  logic [IW-1:0] push_idx;
  logic [H-1:0] restore_ghr, ghr;
  logic [NS-1:0][IW-1:0] restore_path, path;
  logic [H-1:0] m_ghr;
  logic [NS-1:0][IW-1:0] m_path;
  int checks = 0, failures = 0;

  pbnp_history #(.HIST_LEN(H), .PATH_LEN(P), .IDX_W(IW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; push_taken = 0; push_idx = '0; restore = 0;
    restore_ghr = '0; restore_path = '0;
    m_ghr = '0; m_path = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      push = 1'($urandom); push_taken = 1'($urandom); push_idx = IW'($urandom);
      restore = ($urandom % 20) == 0;
      restore_ghr = H'({$urandom, $urandom});
      restore_path = {NS{IW'($urandom)}} ^ (NS*IW)'($urandom);
      @(posedge clk);
      if (restore) begin
        m_ghr = restore_ghr; m_path = restore_path;
      end else if (push) begin
        m_ghr = {m_ghr[H-2:0], push_taken};
        m_path = {m_path[NS-2:0], push_idx};
      end
      @(negedge clk);
      checks += 2;
      if (ghr !== m_ghr) begin failures++; $display("FAIL ghr n=%0d", n); end
      if (path !== m_path) begin failures++; $display("FAIL path n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
