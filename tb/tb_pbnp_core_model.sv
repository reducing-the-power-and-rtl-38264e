// tb_pbnp_core_model: processor-side driver and reference checker for
// pbnp_predictor, used by the end-to-end testbenches.
//
// Driver: a synthetic program of NSITES static branches (always taken,
// always not taken, loop exits, branches correlated with earlier outcomes,
// mostly taken, random) produces a correct-path branch stream. The model
// fetches one branch per cycle with random bubbles. When a prediction is
// wrong it fetches a few wrong-path branches, then signals the recovery a
// few cycles later and resumes on the correct path. Every fourth block of
// 1000 branches runs only the biased and loop branches, so that bias
// weights saturate and filtering takes effect. Resolved correct-path
// branches commit in order at a rate that varies by phase, so that the
// checkpoint table also fills up.
//
// Reference: an independent transaction-level model of the predictor that
// keeps the weights by logical position i = 1..h (not by table and slot),
// computes y = w_0 + sum w_i x_i with w_i taken from the row of the branch
// (i mod P) positions back, samples weights when the request is accepted and
// applies each training one cycle after the commit, as the hardware does.
// Every prediction (direction, filter flag, tag, sum), the one-cycle latency,
// the absence of stalls other than recovery, training read and full
// checkpoint table (so one lookup per cycle otherwise),
// the table clearing time and the activity counters are checked.
// Each mechanism (filtering, skipped update, training, recovery, squash of
// wrong-path branches, kill of a lookup in flight, training stall,
// checkpoint-full stall) must occur at least once; filtering may be exempted
// (REQ_FILTER = 0) for small histories, where the weights carry |y| past the
// training threshold before a bias weight can saturate.
module tb_pbnp_core_model #(
  parameter int unsigned PC_W   = 32,
  parameter int unsigned H      = 42,
  parameter int unsigned P      = 3,
  parameter int unsigned WW     = 8,
  parameter int unsigned BW     = 5,
  parameter int unsigned ROWS   = 512,
  parameter int unsigned BE     = 16384,
  parameter int unsigned CKPT   = 32,
  parameter int unsigned SW     = 16,
  parameter int unsigned THETA  = 112,
  parameter int unsigned NBR    = 20000,   // correct-path branches to run
  parameter int unsigned NSITES = 24,
  parameter int unsigned SEED   = 1,
  parameter bit          REQ_FILTER = 1'b1,   // require filtering to occur
  localparam int unsigned TW    = $clog2(CKPT)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 init_done,
  output logic                 lk_valid,
  output logic [PC_W-1:0]      lk_pc,
  input  logic                 lk_ready,
  input  logic                 pr_valid,
  input  logic                 pr_taken,
  input  logic                 pr_filtered,
  input  logic [TW-1:0]        pr_tag,
  input  logic signed [SW-1:0] pr_sum,
  output logic                 rc_valid,
  output logic [TW-1:0]        rc_tag,
  output logic                 rc_taken,
  output logic                 up_valid,
  output logic                 up_taken,
  input  logic                 up_ready,
  input  logic [TW:0]          inflight,
  input  logic [31:0]          cnt_lookups,
  input  logic [31:0]          cnt_trained,
  input  logic [31:0]          cnt_filter_skips,
  input  logic [31:0]          cnt_weights_written,
  output logic                 done,
  output int                   checks,
  output int                   failures
);

  localparam int unsigned SWEEP = (ROWS > BE) ? ROWS : BE;
  localparam int WMAX = (1 << (WW - 1)) - 1, WMIN = -(1 << (WW - 1));
  localparam int BMAX = (1 << (BW - 1)) - 1, BMIN = -(1 << (BW - 1));

  // ------------------------------------------------------------ program
  int unsigned site_pc   [NSITES];
  int          site_kind [NSITES];
  int          site_cnt  [NSITES];
  bit          outcomes  [$];            // correct-path outcomes so far
  int          trace_pos;                // next correct-path branch
  int unsigned nxt_pc;
  bit          nxt_taken;

  function automatic bit past(input int k);  // k-th most recent outcome
    return (outcomes.size() >= k) ? outcomes[outcomes.size() - k] : 1'b0;
  endfunction

  task automatic gen_next();
    int s;
    s = trace_pos % NSITES;
    if (trace_pos % 97 < 13) s = (trace_pos * 7) % NSITES;   // some irregular control flow
    // every fourth block of 1000 branches is a tight loop of biased branches
    if ((trace_pos / 1000) % 4 == 3) s = (trace_pos % 3) + 6 * ((trace_pos / 3) % 2);
    nxt_pc = site_pc[s];
    unique case (site_kind[s])
      0: nxt_taken = 1'b1;
      1: nxt_taken = 1'b0;
      2: nxt_taken = (site_cnt[s] % 7) != 6;
      3: nxt_taken = past(2) ^ past(5);
      4: nxt_taken = ($urandom % 10) != 0;
      default: nxt_taken = 1'($urandom);
    endcase
    site_cnt[s]++;
  endtask

  // ------------------------------------------------------------ reference predictor
  int rw [H+1][ROWS];            // rw[i][row], i = 1..H
  int rb [BE];
  logic [H-1:0] rh;              // speculative history, bit 0 most recent
  int rpth [P];                  // rpth[d] = row of the branch d back, d = 1..P-1
  int fut  [P+1];                // fut[d] = partial sum of the branch d ahead
  int ref_tag;
  // stage-1 snapshot
  bit s1_v;  bit s1_wrong;  bit s1_taken;
  int s1_idx, s1_bidx, s1_bias;
  int snap [H+1];
  // checkpoints by tag
  int ck_alt  [CKPT][P+1];
  logic [H-1:0] ck_h [CKPT];
  int ck_pth  [CKPT][P];
  int ck_idx  [CKPT], ck_bidx [CKPT], ck_y [CKPT];
  bit ck_pred [CKPT], ck_filt [CKPT], ck_wrong [CKPT], ck_taken [CKPT], ck_fixed [CKPT];
  int head_tag, n_inflight;
  // pending write of a training
  bit pw_v;  int pw_rows [H+1];  int pw_w [H+1];  int pw_bidx, pw_b;
  // counters
  int n_pred, n_train, n_fskip, n_filt, n_rc, n_squash, n_kill, n_stall_train, n_stall_full;
  int n_mis, n_late_mis, n_late;
  // driver state
  int wrong_left, rc_delay;  bit rc_pend;  int rc_ptag;  bit rc_ptaken;
  int commit_phase;
  bit train_now, full_before;

  function automatic int sat(input int v, input int lo, input int hi);
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction
  function automatic int xv(input bit b);
    return b ? 1 : -1;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // gshare index from the speculative history
  function automatic int bias_index(input int unsigned pc);
    int unsigned hx;
    hx = 0;
    for (int k = 0; k < $clog2(BE) && k < int'(H); k++) hx |= int'(rh[k]) << k;
    return int'(((pc >> 2) ^ hx) % BE);
  endfunction

  initial begin
    int cyc, y, c_own;
    bit pred;
    bit filt, sat_b;
    int nf [P+1];
    int na [P+1];
    checks = 0; failures = 0; done = 1'b0;
    lk_valid = 0; lk_pc = '0; rc_valid = 0; rc_tag = '0; rc_taken = 0; up_valid = 0; up_taken = 0;
    void'($urandom(SEED));
    for (int s = 0; s < int'(NSITES); s++) begin
      site_pc[s] = (32'h0040_0000 + ($urandom % 32'h10_0000)) & ~32'h3;
      site_kind[s] = s % 6;
      site_cnt[s] = 0;
    end
    for (int i = 0; i <= int'(H); i++) for (int r = 0; r < int'(ROWS); r++) rw[i][r] = 0;
    for (int e = 0; e < int'(BE); e++) rb[e] = 0;
    rh = '0;
    for (int d = 0; d <= int'(P); d++) fut[d] = 0;
    for (int d = 0; d < int'(P); d++) rpth[d] = 0;
    ref_tag = 0; head_tag = 0; n_inflight = 0;
    s1_v = 0; pw_v = 0;
    {n_pred, n_train, n_fskip, n_filt, n_rc, n_squash, n_kill, n_stall_train, n_stall_full} = '0;
    {n_mis, n_late_mis, n_late} = '0;
    wrong_left = 0; rc_pend = 0; rc_delay = 0; commit_phase = 0;
    trace_pos = 0;
    gen_next();

    // ---- clearing after reset
    @(posedge rst_n);
    cyc = 0;
    while (!init_done) begin @(negedge clk); cyc++; end
    chk(cyc >= int'(SWEEP) - 1 && cyc <= int'(SWEEP) + 1, "table clearing time");

    // ---- main loop: drive at the falling edge, evaluate just after it
    while (trace_pos < int'(NBR) || n_inflight > 0 || s1_v || rc_pend) begin
      @(negedge clk);
      commit_phase = (trace_pos / 1500) % 3;
      // recovery
      rc_valid = 0;
      if (rc_pend) begin
        if (rc_delay == 0) begin rc_valid = 1; rc_tag = TW'(rc_ptag); rc_taken = rc_ptaken; end
        else rc_delay--;
      end
      // fetch
      lk_valid = 0;
      if (wrong_left > 0) begin
        lk_valid = 1; lk_pc = PC_W'(($urandom % 32'h10_0000) << 2);
      end else if (!rc_pend && trace_pos < int'(NBR) && ($urandom % 8) != 0) begin
        lk_valid = 1; lk_pc = PC_W'(nxt_pc);
      end
      // commit the oldest branch when it is resolved
      up_valid = 0;
      if (n_inflight > 0 && !ck_wrong[head_tag] && (!(ck_pred[head_tag] != ck_taken[head_tag]) || ck_fixed[head_tag])) begin
        unique case (commit_phase)
          0: up_valid = ($urandom % 4) != 0;
          1: up_valid = ($urandom % 16) == 0;   // slow commit: the checkpoints fill
          default: up_valid = 1'($urandom);
        endcase
        up_taken = ck_taken[head_tag];
      end
      #1;
      chk(int'(inflight) == n_inflight, "in-flight count");
      full_before = (n_inflight + int'(s1_v) >= int'(CKPT));
      train_now = 0;

      // ---- (a) recovery
      if (rc_valid) begin
        int t;
        n_rc++;
        t = rc_ptag;
        if (s1_v) n_kill++;
        s1_v = 0;
        chk(!pr_valid, "no prediction during recovery");
        // squash younger entries
        while (n_inflight > 0 && ((ref_tag - 1 + CKPT) % CKPT) != t) begin
          ref_tag = (ref_tag - 1 + CKPT) % CKPT;
          n_inflight--; n_squash++;
        end
        ref_tag = (t + 1) % CKPT;
        for (int d = 1; d < int'(P); d++) fut[d] = ck_alt[t][d];
        rh = {ck_h[t][H-2:0], rc_ptaken};
        for (int d = int'(P) - 1; d > 1; d--) rpth[d] = ck_pth[t][d-1];
        rpth[1] = ck_idx[t];
        ck_fixed[t] = 1;
        rc_pend = 0;
        wrong_left = 0;
      end else if (s1_v) begin
        // ---- (b) prediction of the branch accepted last cycle
        c_own = 0;
        for (int i = int'(P); i <= int'(H); i += int'(P)) c_own += snap[i] * xv(rh[i-1]);
        y = s1_bias + fut[1] + c_own;
        sat_b = (s1_bias == BMAX) || (s1_bias == BMIN);
        filt = sat_b;
        pred = sat_b ? (s1_bias >= 0) : (y >= 0);
        for (int d = 1; d < int'(P); d++) begin
          int cp, cn;
          cp = 0; cn = 0;
          for (int i = d; i <= int'(H); i += int'(P)) begin
            if (i == d) begin cp += snap[i]; cn -= snap[i]; end
            else begin cp += snap[i] * xv(rh[i-d-1]); cn += snap[i] * xv(rh[i-d-1]); end
          end
          nf[d] = ((d + 1 < int'(P)) ? fut[d+1] : 0) + (pred ? cp : cn);
          na[d] = ((d + 1 < int'(P)) ? fut[d+1] : 0) + (pred ? cn : cp);
        end
        chk(pr_valid, "prediction one cycle after the request");
        chk(pr_taken == pred, "predicted direction");
        chk(pr_filtered == filt, "filter flag");
        chk(int'(pr_tag) == ref_tag, "tag");
        chk(int'(pr_sum) == y, "dot product");
        if (pr_valid && (pr_taken != pred || int'(pr_sum) != y) && failures < 20)
          $display("  branch %0d: dut taken=%b sum=%0d, ref taken=%0d sum=%0d", n_pred, pr_taken, pr_sum, pred, y);
        n_pred++;
        if (filt) n_filt++;
        // checkpoint
        for (int d = 1; d < int'(P); d++) ck_alt[ref_tag][d] = na[d];
        ck_h[ref_tag] = rh;
        for (int d = 1; d < int'(P); d++) ck_pth[ref_tag][d] = rpth[d];
        ck_idx[ref_tag] = s1_idx; ck_bidx[ref_tag] = s1_bidx; ck_y[ref_tag] = y;
        ck_pred[ref_tag] = pred; ck_filt[ref_tag] = filt;
        ck_wrong[ref_tag] = s1_wrong; ck_taken[ref_tag] = s1_taken; ck_fixed[ref_tag] = 0;
        if (!s1_wrong && pred != s1_taken) begin
          n_mis++;
          if (trace_pos > int'(NBR) / 2) n_late_mis++;
          // wrong path follows, then the recovery
          wrong_left = $urandom % 4;
          rc_pend = 1; rc_delay = 1 + $urandom % 5; rc_ptag = ref_tag; rc_ptaken = s1_taken;
        end
        if (!s1_wrong && trace_pos > int'(NBR) / 2) n_late++;
        ref_tag = (ref_tag + 1) % CKPT;
        n_inflight++;
        // speculative state
        for (int d = 1; d < int'(P); d++) fut[d] = nf[d];
        rh = {rh[H-2:0], pred};
        for (int d = int'(P) - 1; d > 1; d--) rpth[d] = rpth[d-1];
        rpth[1] = s1_idx;
        s1_v = 0;
      end else begin
        chk(!pr_valid, "no prediction without a request");
      end

      // ---- (c) lookup request accepted this cycle
      if (lk_valid && lk_ready) begin
        s1_v = 1;
        s1_idx = int'((lk_pc >> 2) % ROWS);
        s1_bidx = bias_index(lk_pc);
        s1_bias = rb[s1_bidx];
        for (int i = 1; i <= int'(H); i++) snap[i] = rw[i][s1_idx];
        s1_wrong = (wrong_left > 0) || rc_pend;
        s1_taken = nxt_taken;
        if (wrong_left > 0) wrong_left--;
        else if (!rc_pend) begin
          outcomes.push_back(nxt_taken);
          trace_pos++;
          gen_next();
        end
      end else if (lk_valid) begin
        if (n_inflight + int'(s1_v) >= int'(CKPT)) n_stall_full++;
      end

      // ---- (d) the write of the training accepted last cycle
      if (pw_v) begin
        for (int i = 1; i <= int'(H); i++) rw[i][pw_rows[i]] = pw_w[i];
        rb[pw_bidx] = pw_b;
        pw_v = 0;
      end

      // ---- (e) commit
      if (up_valid && up_ready) begin
        int t;
        bit tk;
        t = head_tag; tk = up_taken;
        if (ck_filt[t]) train_now = (ck_pred[t] != tk);
        else train_now = (ck_pred[t] != tk) || (ck_y[t] <= int'(THETA) && ck_y[t] >= -int'(THETA));
        if (train_now) begin
          n_train++;
          if (lk_valid) n_stall_train++;
          chk(!lk_ready, "lookup stalls during the training read");
          for (int i = 1; i <= int'(H); i++) begin
            int tt;
            tt = i % int'(P);
            pw_rows[i] = (tt == 0) ? ck_idx[t] : ck_pth[t][tt];
            pw_w[i] = sat(rw[i][pw_rows[i]] + ((ck_h[t][i-1] == tk) ? 1 : -1), WMIN, WMAX);
          end
          pw_bidx = ck_bidx[t];
          pw_b = sat(rb[pw_bidx] + (tk ? 1 : -1), BMIN, BMAX);
          pw_v = 1;
        end else if (ck_filt[t]) n_fskip++;
        head_tag = (head_tag + 1) % CKPT;
        n_inflight--;
      end
      // one lookup per cycle unless a stall reason holds
      if (rc_valid || full_before || train_now) chk(!lk_ready, "stall when required");
      else chk(lk_ready, "no stall without a reason");
    end

    @(negedge clk);
    @(negedge clk);
    chk(cnt_lookups == 32'(n_pred), "lookup counter");
    chk(cnt_trained == 32'(n_train), "training counter");
    chk(cnt_filter_skips == 32'(n_fskip), "filtered-skip counter");
    chk(cnt_weights_written == 32'(n_train * (H + 1)), "weights-written counter");
    $display("predictions=%0d mispredictions=%0d (second half %0d of %0d) filtered=%0d",
             n_pred, n_mis, n_late_mis, n_late, n_filt);
    $display("trainings=%0d filtered_skips=%0d recoveries=%0d squashed=%0d killed=%0d",
             n_train, n_fskip, n_rc, n_squash, n_kill);
    $display("stalls: training_read=%0d checkpoint_full=%0d", n_stall_train, n_stall_full);
    if (REQ_FILTER) begin
      chk(n_filt > 0, "bias-based filtering happened");
      chk(n_fskip > 0, "filtered update skipped");
    end
    chk(n_train > 0, "training happened");
    chk(n_rc > 0, "recovery happened");
    chk(n_squash > 0, "wrong-path branches squashed");
    chk(n_kill > 0, "lookup in flight killed by a recovery");
    chk(n_stall_train > 0, "training read stalled a lookup");
    chk(n_stall_full > 0, "full checkpoint table stalled a lookup");
    chk(n_late > 0 && n_late_mis * 4 < n_late, "predictor learns (second-half mispredictions under 25%)");
    done = 1'b1;
  end
endmodule
