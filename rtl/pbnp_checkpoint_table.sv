// pbnp_checkpoint_table: storage for the checkpoint of every in-flight branch.
//
// Each predicted branch allocates one entry, in program order, holding what
// is needed to restore the predictor if it mispredicts (the partial sums for
// the opposite direction and the history before it) and to update the
// predictor when it commits. The entry number is the branch's tag.
//
// It is a circular buffer of ENTRIES (a power of two) entries:
//   alloc    writes alloc_data at the tail; alloc_tag is the tag it gets.
//   free     retires the oldest entry (head_tag, head_data).
//   squash   discards every entry younger than squash_tag (after a
//            misprediction); the entry itself stays. It overrides alloc.
//   rd_tag   reads any entry combinationally (rd_data), for recovery.
// count is the number of entries in use; full and empty follow from it.
// Entries are written on the clock edge; pointers reset to empty.
//
// A checkpoint of the partial sums per in-flight branch follows the scheme;
// the circular buffer, its 32 entries and the update information kept in
// each entry are this design's own choices.
module pbnp_checkpoint_table #(
  parameter int unsigned ENTRIES = pbnp_pkg::CKPT_ENTRIES,
  parameter int unsigned DATA_W  = 128,
  localparam int unsigned TAG_W  = $clog2(ENTRIES)
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               alloc,
  input  logic [DATA_W-1:0]  alloc_data,
  output logic [TAG_W-1:0]   alloc_tag,
  input  logic               free,
  output logic [TAG_W-1:0]   head_tag,
  output logic [DATA_W-1:0]  head_data,
  input  logic               squash,
  input  logic [TAG_W-1:0]   squash_tag,
  input  logic [TAG_W-1:0]   rd_tag,
  output logic [DATA_W-1:0]  rd_data,
  output logic [TAG_W:0]     count,
  output logic               full,
  output logic               empty
);

  logic [DATA_W-1:0] mem [ENTRIES];
  logic [TAG_W:0]    head_q, tail_q;
  logic [TAG_W-1:0]  keep;   // entries from head up to squash_tag, minus one

  assign alloc_tag = tail_q[TAG_W-1:0];
  assign head_tag  = head_q[TAG_W-1:0];
  assign head_data = mem[head_tag];
  assign rd_data   = mem[rd_tag];
  assign count     = tail_q - head_q;
  assign full      = (count == (TAG_W+1)'(ENTRIES));
  assign empty     = (count == '0);
  assign keep      = squash_tag - head_tag;

  always_ff @(posedge clk) begin
    if (alloc && !squash) mem[alloc_tag] <= alloc_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
    end else begin
      if (free) head_q <= head_q + 1'b1;
      if (squash)     tail_q <= head_q + (TAG_W+1)'(keep) + 1'b1;
      else if (alloc) tail_q <= tail_q + 1'b1;
    end
  end

  // A squash must name an entry in flight; alloc needs a free entry.
  a_squash_inflight: assert property (@(posedge clk) disable iff (!rst_n)
    squash |-> ((TAG_W+1)'(keep) < count));
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (alloc && !squash) |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
    free |-> !empty);

endmodule
