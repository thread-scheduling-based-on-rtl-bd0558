// tb_lq_smt_sched_top: end-to-end testbench for lq_smt_sched_top at its
// default sizes.
//
// The testbench plays the rest of an SMT processor around the block:
//   * Fetch: every cycle it fetches the threads and slot counts the block
//     chooses, from synthetic per-thread programs (32-instruction loops at
//     per-thread PCs). A fetch block ends at an 8-instruction boundary,
//     which sets each thread's fetch_avail. Fetched instructions are
//     dispatched the next cycle and held while disp_ready is low.
//   * Rename: each instruction gets a free physical tag (256 tags); its
//     sources are the tags of earlier instructions of its thread (8 and 3
//     instructions back), marked ready when those have already produced
//     their result.
//   * Execute: an issued instruction broadcasts its tag on the wake ports
//     after its latency (integer 1, load 3, FP 4, cache miss 20 cycles; at
//     most 10 tags per cycle, extra ones wait a cycle).
//   * Commit: in order per thread, 12 per cycle over all threads, returning
//     PC and measured IID to the block.
//   * Squash: at set cycles a thread is flushed and refetched.
// Two workloads run back to back, separated by a reset: 2 threads, then 4,
// like the two- and four-program mixes the scheme was evaluated with. For
// each, the prediction accuracy (predicted-LQ instructions that really had
// IID >= 5) and effectiveness (LQ instructions that had been predicted) are
// reported; they describe these synthetic programs only.
//
// Checks, all against values the testbench works out itself:
//   * every dispatch prediction equals a reference model of the IID-table
//     (direct mapped, 64 entries, store on IID >= 5, remove on IID < 5);
//   * every issued instruction was dispatched, not yet issued, not
//     squashed, had its operands ready, and carries IID = issue cycle -
//     dispatch cycle (saturating at 15) and its own prediction bit;
//   * the per-thread LQ counts equal the predicted-LQ instructions the
//     testbench knows to be in the queues (one cycle later);
//   * each fetch choice has no more predicted-LQ instructions than any other
//     thread that could have fetched, and slot counts add up;
//   * every instruction of every thread commits.
// Each mechanism is counted and must occur at least once: an LQ prediction,
// a table store, a table removal, an IID of 5 or more, a dispatch stall, a
// flush, a fetch decided by the LQ counts, a tie, two threads fetching in
// one cycle, and issues from the floating-point queue.
module tb_lq_smt_sched_top;
  import lq_pkg::*;

  localparam int DISP_W = 8, INT_IW = 6, FP_IW = 4, COMMIT_W = 12, WAKE_W = 10;
  localparam int FT = 2, FW = 8;
  localparam int N_PER_THREAD = 1200;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    disp_valid   [DISP_W];
  instr_t  disp_ins     [DISP_W];
  logic    disp_ready;
  logic    disp_lq_pred [DISP_W];
  logic    int_issue_valid [INT_IW];
  issued_t int_issue       [INT_IW];
  logic    fp_issue_valid  [FP_IW];
  issued_t fp_issue        [FP_IW];
  logic    wake_valid [WAKE_W];
  ptag_t   wake_tag   [WAKE_W];
  logic    commit_valid [COMMIT_W];
  commit_t commit       [COMMIT_W];
  logic [THREADS-1:0] flush;
  logic        thread_active [THREADS];
  logic [3:0]  fetch_avail   [THREADS];
  logic        fetch_valid   [FT];
  tid_t        fetch_tid     [FT];
  logic [3:0]  fetch_n       [FT];
  logic [7:0]  lq_count      [THREADS];
  logic [6:0]  table_occupancy;
  logic [6:0]  int_iq_count;
  logic [6:0]  fp_iq_count;

  lq_smt_sched_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;

  // mechanism counters
  int n_pred = 0, n_store = 0, n_remove = 0, n_iid_lq = 0, n_stall = 0, n_flush = 0;
  int n_by_count = 0, n_tie = 0, n_two = 0, n_fp_issue = 0, n_commit = 0;
  // prediction quality per workload: issued instructions that were predicted
  // LQ, that had IID >= 5, and both
  int q_pred = 0, q_lq = 0, q_both = 0;

  task automatic fail(string msg);
    failures++;
    if (failures < 30) $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  // ---------------------------------------------------------------- program
  function automatic pc_t pc_of(int t, int dyn);
    return pc_t'(64'h1_2000_0000 + 64'(t) * 64'h400 + 64'(dyn % 32) * 4);
  endfunction
  // 0 int, 1 load hit, 2 fp, 3 load miss
  function automatic int kind_of(int t, int dyn);
    int i = dyn % 32;
    case (t)
      0: return (i % 8 == 3) ? 3 : (i % 8 == 6) ? 2 : (i % 4 == 1) ? 1 : 0;
      1: return (i == 5) ? 3 : (i % 4 == 1) ? 1 : 0;
      2: return (i % 2 == 0) ? 2 : (i == 13) ? 3 : 0;
      default: return (i == 7 || i == 23) ? 3 : (i % 3 == 0) ? 2 : 0;
    endcase
  endfunction
  function automatic int lat_of(int k);
    case (k) 0: return 1; 1: return 3; 2: return 4; default: return 20; endcase
  endfunction

  // ---------------------------------------------------------------- records
  typedef struct {
    int   tid;
    int   dyn;
    pc_t  pc;
    int   kind;
    int   tag;
    int   p1, p2;        // producer dyn numbers, -1 for none
    bit   rdy1, rdy2;    // ready at dispatch
    int   dcyc;          // dispatch cycle, -1 before
    int   icyc;          // issue cycle, -1 before
    int   wcyc;          // wake cycle, -1 before
    int   iid;
    bit   lq;
    bit   squashed;
  } rec_t;

  rec_t recs[int];           // by uid
  int   next_uid;
  int   tag_uid [256];       // uid owning a tag, -1 free
  int   free_tags[$];
  int   rob [THREADS][$];    // uids in program order
  int   dyn_uid [THREADS][int];
  int   committed [THREADS]; // dyn numbers below are committed
  int   next_dyn [THREADS];
  int   latch[$];            // fetched, waiting for dispatch
  int   wake_q [int][$];     // cycle -> uids
  int   nthreads;
  int   prev_cnt [THREADS];

  // IID-table reference
  bit   m_valid [64];
  pc_t  m_pc    [64];
  function automatic bit m_hit(pc_t pc);
    return m_valid[pc[7:2]] && m_pc[pc[7:2]] == pc;
  endfunction

  function automatic bit prod_ready(int t, int pdyn, int c);
    int u;
    if (pdyn < 0 || pdyn < committed[t]) return 1'b1;
    u = dyn_uid[t][pdyn];
    return recs[u].wcyc >= 0 && recs[u].wcyc < c;
  endfunction

  function automatic int prod_tag(int t, int pdyn);
    if (pdyn < 0 || pdyn < committed[t]) return 0;
    return recs[dyn_uid[t][pdyn]].tag;
  endfunction

  task automatic clear_inputs();
    for (int d = 0; d < DISP_W; d++) begin disp_valid[d] = 1'b0; disp_ins[d] = '0; end
    for (int w = 0; w < WAKE_W; w++) begin wake_valid[w] = 1'b0; wake_tag[w] = '0; end
    for (int c = 0; c < COMMIT_W; c++) begin commit_valid[c] = 1'b0; commit[c] = '0; end
    for (int t = 0; t < THREADS; t++) begin thread_active[t] = 1'b0; fetch_avail[t] = '0; end
    flush = '0;
  endtask

  function automatic bit thread_done(int t);
    return committed[t] >= N_PER_THREAD;
  endfunction

  // check one issue slot
  task automatic check_issue(issued_t is, bit want_fp);
    int u;
    if (tag_uid[is.ins.seq] < 0) begin fail($sformatf("issued unknown tag %0d", is.ins.seq)); return; end
    u = tag_uid[is.ins.seq];
    checks++;
    if (recs[u].dcyc < 0 || recs[u].dcyc >= cyc || recs[u].icyc >= 0 || recs[u].squashed)
      fail($sformatf("tag %0d issued out of turn (dcyc=%0d icyc=%0d sq=%0b)", is.ins.seq,
                     recs[u].dcyc, recs[u].icyc, recs[u].squashed));
    checks++;
    if (!((recs[u].rdy1 || prod_ready(recs[u].tid, recs[u].p1, cyc)) &&
          (recs[u].rdy2 || prod_ready(recs[u].tid, recs[u].p2, cyc))))
      fail($sformatf("tag %0d issued before its operands", is.ins.seq));
    checks++;
    if (int'(is.iid) != ((cyc - recs[u].dcyc > 15) ? 15 : cyc - recs[u].dcyc))
      fail($sformatf("tag %0d IID %0d, dispatched %0d issued %0d", is.ins.seq, is.iid, recs[u].dcyc, cyc));
    checks++;
    if (is.lq_pred != recs[u].lq || is.ins.is_fp != want_fp || int'(is.ins.tid) != recs[u].tid)
      fail($sformatf("tag %0d wrong LQ bit / queue / thread", is.ins.seq));
    recs[u].icyc = cyc;
    recs[u].iid  = int'(is.iid);
    if (int'(is.iid) >= LQ_THRESH) n_iid_lq++;
    if (is.lq_pred) q_pred++;
    if (int'(is.iid) >= LQ_THRESH) q_lq++;
    if (is.lq_pred && int'(is.iid) >= LQ_THRESH) q_both++;
    wake_q[cyc + lat_of(recs[u].kind) - 1].push_back(u);
  endtask

  task automatic squash_thread(int t);
    int keep[$];
    int oldest = next_dyn[t];
    foreach (rob[t][i]) begin
      int u = rob[t][i];
      if (recs[u].dyn < oldest) oldest = recs[u].dyn;
      recs[u].squashed = 1'b1;
      // not issued (in the queue, or dispatching now): tag is free at once
      if (recs[u].icyc < 0) begin
        tag_uid[recs[u].tag] = -1; free_tags.push_back(recs[u].tag); recs.delete(u);
      end
    end
    rob[t].delete();
    foreach (latch[i]) if (recs.exists(latch[i])) keep.push_back(latch[i]);
    latch = keep;
    next_dyn[t] = oldest;
  endtask

  task automatic run_workload(int nt, int flush_cycle, int flush_thread);
    int stop;
    nthreads = nt;
    clear_inputs();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    recs.delete(); next_uid = 0; latch.delete(); wake_q.delete(); free_tags.delete();
    for (int g = 0; g < 256; g++) begin tag_uid[g] = -1; free_tags.push_back(g); end
    for (int t = 0; t < THREADS; t++) begin
      rob[t].delete(); dyn_uid[t].delete(); committed[t] = 0; next_dyn[t] = 0; prev_cnt[t] = 0;
    end
    foreach (m_valid[e]) begin m_valid[e] = 1'b0; m_pc[e] = '0; end
    stop = cyc + 40000;
    q_pred = 0; q_lq = 0; q_both = 0;

    while (cyc < stop) begin
      int cm_uids[$];
      int wk[$];
      int disp_n;
      bit all_done = 1'b1;
      bit flushing [THREADS];
      bit fetch_ok;
      bit s_ready;
      bit s_lq [DISP_W];
      bit s_fv [FT];
      int s_ft [FT], s_fn [FT];
      for (int t = 0; t < nt; t++) if (!thread_done(t)) all_done = 1'b0;
      if (all_done && latch.size() == 0) break;
      clear_inputs();
      for (int t = 0; t < THREADS; t++) flushing[t] = (cyc == flush_cycle && t == flush_thread);
      for (int t = 0; t < THREADS; t++) flush[t] = flushing[t];

      // commit: up to 12 completed instructions, in order per thread
      for (int k = 0; k < THREADS; k++) begin
        int t = (cyc + k) % THREADS;
        if (flushing[t]) continue;
        for (int i = 0; i < rob[t].size() && cm_uids.size() < COMMIT_W; i++) begin
          int u = rob[t][i];
          if (recs[u].wcyc < 0 || recs[u].wcyc >= cyc) break;
          commit_valid[cm_uids.size()] = 1'b1;
          commit[cm_uids.size()]       = '{pc: recs[u].pc, iid: iid_t'(recs[u].iid)};
          cm_uids.push_back(u);
        end
      end

      // dispatch the latched group
      disp_n = latch.size();
      foreach (latch[d]) begin
        rec_t r = recs[latch[d]];
        disp_valid[d]           = 1'b1;
        disp_ins[d].tid         = tid_t'(r.tid);
        disp_ins[d].pc          = r.pc;
        disp_ins[d].is_fp       = (r.kind == 2);
        disp_ins[d].src1        = ptag_t'(prod_tag(r.tid, r.p1));
        disp_ins[d].src2        = ptag_t'(prod_tag(r.tid, r.p2));
        disp_ins[d].src_rdy[0]  = prod_ready(r.tid, r.p1, cyc);
        disp_ins[d].src_rdy[1]  = prod_ready(r.tid, r.p2, cyc);
        disp_ins[d].has_dst     = 1'b1;
        disp_ins[d].dst         = ptag_t'(r.tag);
        disp_ins[d].seq         = seq_t'(r.tag);
        recs[latch[d]].rdy1     = disp_ins[d].src_rdy[0];
        recs[latch[d]].rdy2     = disp_ins[d].src_rdy[1];
      end

      // fetch: only when the latch will be free and tags suffice
      #1;
      fetch_ok = (disp_n == 0 || disp_ready) && free_tags.size() >= FW;
      for (int t = 0; t < nt; t++) begin
        int left = N_PER_THREAD - next_dyn[t];
        int blk  = FW - (next_dyn[t] % FW);
        thread_active[t] = fetch_ok && !flushing[t] && left > 0;
        fetch_avail[t]   = 4'((left < blk) ? left : blk);
      end
      #1;

      // ---- compare outputs
      if (disp_n > 0 && !disp_ready) n_stall++;
      for (int d = 0; d < disp_n; d++) begin
        checks++;
        if (disp_lq_pred[d] !== m_hit(disp_ins[d].pc))
          fail($sformatf("prediction for pc %h: %0b, table model %0b", disp_ins[d].pc,
                         disp_lq_pred[d], m_hit(disp_ins[d].pc)));
      end
      for (int t = 0; t < THREADS; t++) begin
        checks++;
        if (int'(lq_count[t]) != prev_cnt[t])
          fail($sformatf("thread %0d LQ count %0d, expected %0d", t, lq_count[t], prev_cnt[t]));
      end
      for (int s = 0; s < INT_IW; s++) if (int_issue_valid[s]) check_issue(int_issue[s], 1'b0);
      for (int s = 0; s < FP_IW; s++)  if (fp_issue_valid[s]) begin check_issue(fp_issue[s], 1'b1); n_fp_issue++; end
      // wake: results due now (including 1-cycle results of this cycle's
      // issues), at most WAKE_W, the rest wait a cycle
      if (wake_q.exists(cyc)) begin
        foreach (wake_q[cyc][i]) begin
          int u = wake_q[cyc][i];
          if (wk.size() < WAKE_W) wk.push_back(u);
          else wake_q[cyc + 1].push_back(u);
        end
        wake_q.delete(cyc);
      end
      foreach (wk[i]) begin
        if (!recs[wk[i]].squashed) begin
          wake_valid[i] = 1'b1;
          wake_tag[i]   = ptag_t'(recs[wk[i]].tag);
        end
      end

      begin
        int slots = 0;
        bit used [THREADS];
        foreach (used[t]) used[t] = 1'b0;
        for (int f = 0; f < FT; f++) if (fetch_valid[f]) begin
          int ft = int'(fetch_tid[f]);
          checks++;
          if (!thread_active[ft] || used[ft] || fetch_n[f] == 0 || fetch_n[f] > fetch_avail[ft])
            fail($sformatf("fetch slot %0d: thread %0d n=%0d not allowed", f, ft, fetch_n[f]));
          for (int t = 0; t < nt; t++) if (t != ft && !used[t] && thread_active[t] && fetch_avail[t] != 0) begin
            checks++;
            if (lq_count[t] < lq_count[ft])
              fail($sformatf("fetched thread %0d (LQ %0d) over thread %0d (LQ %0d)", ft,
                             lq_count[ft], t, lq_count[t]));
            else if (lq_count[t] > lq_count[ft]) n_by_count++;
            else n_tie++;
          end
          used[ft] = 1'b1;
          slots += int'(fetch_n[f]);
        end
        checks++;
        if (slots > FW) fail("more than 8 instructions fetched");
        if (fetch_valid[0] && fetch_valid[1]) n_two++;
        // an eligible thread must be chosen when one exists
        for (int t = 0; t < nt; t++) if (thread_active[t] && fetch_avail[t] != 0) begin
          checks++;
          if (!fetch_valid[0]) fail("no thread chosen although one could fetch");
          break;
        end
      end
      // queue contents during this cycle, for the next cycle's LQ counts
      for (int t = 0; t < THREADS; t++) prev_cnt[t] = 0;
      foreach (recs[u]) if (recs[u].dcyc >= 0 && recs[u].dcyc < cyc && !recs[u].squashed &&
                            (recs[u].icyc < 0 || recs[u].icyc == cyc) && recs[u].lq)
        prev_cnt[recs[u].tid]++;

      // outputs the model update below needs, sampled before the edge
      s_ready = disp_ready;
      for (int d = 0; d < DISP_W; d++) s_lq[d] = disp_lq_pred[d];
      for (int f = 0; f < FT; f++) begin s_fv[f] = fetch_valid[f]; s_ft[f] = int'(fetch_tid[f]); s_fn[f] = int'(fetch_n[f]); end
      @(posedge clk);
      // ---- model update at the clock edge
      // IID-table reference, commit slot order
      foreach (cm_uids[c]) begin
        rec_t r = recs[cm_uids[c]];
        if (r.iid >= LQ_THRESH) begin
          if (!m_hit(r.pc)) n_store++;
          m_valid[r.pc[7:2]] = 1'b1; m_pc[r.pc[7:2]] = r.pc;
        end else if (m_hit(r.pc)) begin
          n_remove++;
          m_valid[r.pc[7:2]] = 1'b0;
        end
      end
      foreach (cm_uids[c]) begin
        int u = cm_uids[c];
        int t = recs[u].tid;
        void'(rob[t].pop_front());
        committed[t] = recs[u].dyn + 1;
        tag_uid[recs[u].tag] = -1;
        free_tags.push_back(recs[u].tag);
        recs.delete(u);
        n_commit++;
      end
      foreach (wk[i]) begin
        int u = wk[i];
        if (recs[u].squashed) begin
          tag_uid[recs[u].tag] = -1; free_tags.push_back(recs[u].tag); recs.delete(u);
        end else recs[u].wcyc = cyc;
      end
      if (disp_n > 0 && s_ready) begin
        foreach (latch[d]) begin
          recs[latch[d]].dcyc = cyc;
          recs[latch[d]].lq   = s_lq[d];
          if (s_lq[d]) n_pred++;
        end
        latch.delete();
      end
      for (int t = 0; t < THREADS; t++) if (flushing[t]) begin n_flush++; squash_thread(t); end
      // fetched instructions enter the latch and the reorder buffer
      for (int f = 0; f < FT; f++) if (s_fv[f]) begin
        int t = s_ft[f];
        for (int k = 0; k < s_fn[f]; k++) begin
          rec_t r;
          int dyn = next_dyn[t]++;
          r.tid = t; r.dyn = dyn; r.pc = pc_of(t, dyn); r.kind = kind_of(t, dyn);
          r.p1 = dyn - 8; r.p2 = (dyn % 4 == 0) ? dyn - 3 : -1;
          r.rdy1 = 0; r.rdy2 = 0; r.dcyc = -1; r.icyc = -1; r.wcyc = -1; r.iid = 0;
          r.lq = 0; r.squashed = 0;
          r.tag = free_tags.pop_front();
          tag_uid[r.tag] = next_uid;
          recs[next_uid] = r;
          dyn_uid[t][dyn] = next_uid;
          rob[t].push_back(next_uid);
          latch.push_back(next_uid);
          next_uid++;
        end
      end
      cyc++;
      @(negedge clk);
    end
    // accuracy: share of predicted-LQ instructions that were LQ;
    // effectiveness: share of LQ instructions that had been predicted
    $display("%0d threads: accuracy %0d%% (%0d of %0d predicted), effectiveness %0d%% (%0d of %0d LQ)",
             nt, (q_pred > 0) ? 100 * q_both / q_pred : 0, q_both, q_pred,
             (q_lq > 0) ? 100 * q_both / q_lq : 0, q_both, q_lq);
    for (int t = 0; t < nt; t++) begin
      checks++;
      if (!thread_done(t)) fail($sformatf("thread %0d committed only %0d of %0d", t, committed[t], N_PER_THREAD));
    end
  endtask

  initial begin : watchdog
    repeat (120000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c0;
    c0 = cyc;
    run_workload(2, 300, 1);
    $display("2 threads: %0d instructions in %0d cycles", 2 * N_PER_THREAD, cyc - c0);
    c0 = cyc;
    run_workload(4, cyc + 500, 3);
    $display("4 threads: %0d instructions in %0d cycles", 4 * N_PER_THREAD, cyc - c0);
    $display("LQ predictions %0d, table stores %0d, removals %0d, IID>=5 %0d, dispatch stalls %0d, flushes %0d",
             n_pred, n_store, n_remove, n_iid_lq, n_stall, n_flush);
    $display("fetch by LQ count %0d, ties %0d, two-thread fetches %0d, FP issues %0d, commits %0d",
             n_by_count, n_tie, n_two, n_fp_issue, n_commit);
    checks++; if (n_pred == 0)     fail("no LQ prediction");
    checks++; if (n_store == 0)    fail("no table store");
    checks++; if (n_remove == 0)   fail("no table removal");
    checks++; if (n_iid_lq == 0)   fail("no IID >= 5");
    checks++; if (n_stall == 0)    fail("no dispatch stall");
    checks++; if (n_flush < 2)     fail("flush did not happen");
    checks++; if (n_by_count == 0) fail("LQ counts never decided a fetch");
    checks++; if (n_tie == 0)      fail("no tie between threads");
    checks++; if (n_two == 0)      fail("never two threads in one fetch cycle");
    checks++; if (n_fp_issue == 0) fail("no FP issue");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
