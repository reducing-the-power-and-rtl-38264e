// tb_pbnp_checkpoint_table: self-checking test of the in-flight checkpoint
// buffer (8 entries). Random allocations, in-order frees and squashes are
// mirrored by a queue of (tag, data) pairs; tags, head data, random reads,
// count, full and empty are checked every cycle. The test also fills the
// buffer to full and drains it to empty.
module tb_pbnp_checkpoint_table;
  localparam int unsigned E = 8, DW = 16, TW = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  logic alloc, free, squash;
  logic [DW-1:0] alloc_data, head_data, rd_data;
  logic [TW-1:0] alloc_tag, head_tag, squash_tag, rd_tag;
  logic [TW:0] count;
  logic full, empty;
  int checks = 0, failures = 0, nfull = 0, nempty = 0, nsquash = 0;
  logic [DW-1:0] q_data [$];
  logic [TW-1:0] q_tag [$];
  logic [TW-1:0] next_tag;

  pbnp_checkpoint_table #(.ENTRIES(E), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    alloc = 0; free = 0; squash = 0; alloc_data = '0; squash_tag = '0; rd_tag = '0;
    next_tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      int phase, k;
      phase = (n / 500) % 4;   // 0: mixed, 1: fill, 2: mixed, 3: drain
      // check the state
      chk(count == (TW+1)'(q_tag.size()), "count");
      chk(full == (q_tag.size() == E), "full");
      chk(empty == (q_tag.size() == 0), "empty");
      chk(alloc_tag == next_tag, "alloc_tag");
      if (full) nfull++;
      if (empty) nempty++;
      if (q_tag.size() > 0) begin
        chk(head_tag == q_tag[0], "head_tag");
        chk(head_data == q_data[0], "head_data");
        k = $urandom % q_tag.size();
        rd_tag = q_tag[k];
        #1;
        chk(rd_data == q_data[k], "rd_data");
      end
      // choose the operations
      alloc  = (q_tag.size() < E) && (phase == 1 ? ($urandom % 4 != 0) : phase == 3 ? 1'b0 : 1'($urandom));
      free   = (q_tag.size() > 0) && (phase == 3 ? ($urandom % 4 != 0) : phase == 1 ? ($urandom % 8 == 0) : 1'($urandom));
      squash = (q_tag.size() > 1) && (phase != 1) && ($urandom % 10 == 0);
      alloc_data = DW'($urandom);
      k = 0;
      if (squash) begin
        k = 1 + ($urandom % (q_tag.size() - 1));   // keep at least one past the head
        squash_tag = q_tag[k];
      end
      @(posedge clk);
      if (squash) begin
        nsquash++;
        while (q_tag.size() > k + 1) begin void'(q_tag.pop_back()); void'(q_data.pop_back()); end
        next_tag = q_tag[k] + 1'b1;
      end else if (alloc) begin
        q_tag.push_back(next_tag); q_data.push_back(alloc_data);
        next_tag = next_tag + 1'b1;
      end
      if (free) begin void'(q_tag.pop_front()); void'(q_data.pop_front()); end
      @(negedge clk);
    end
    chk(nfull > 0, "buffer reached full");
    chk(nempty > 0, "buffer reached empty");
    chk(nsquash > 0, "squash happened");
    $display("full=%0d empty=%0d squash=%0d", nfull, nempty, nsquash);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
