// tb_instruction_queue: self-checking testbench for instruction_queue.
//
// A reference model keeps the queue as a list in age order (dispatch cycle,
// then dispatch slot) and the cycle in which each register tag was first
// broadcast. In every cycle it predicts exactly which instructions issue
// (the ISSUE_W oldest whose sources are ready), in which slot, with which
// issue delay (issue cycle minus dispatch cycle, saturating at 15) and
// predicted-LQ bit, and compares that with the block. It also compares
// disp_ready (at most ENTRIES-DISP_W entries in use), the occupancy count
// and the per-entry thread/LQ view. Random traffic runs in epochs separated
// by a reset, so that the 256 register tags can be woken again. Thread
// flushes are injected at random. The test counts how often dispatch was
// refused for lack of room, how often a flush removed instructions, and how
// many instructions reached the LQ threshold, and fails if any never
// happened.
module tb_instruction_queue;
  import lq_pkg::*;

  localparam int ENTRIES = 64;
  localparam int DISP_W  = 8;
  localparam int ISSUE_W = 6;
  localparam int WAKE_W  = 10;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    disp_valid [DISP_W];
  instr_t  disp_ins   [DISP_W];
  logic    disp_lq    [DISP_W];
  logic    disp_ready;
  logic    wake_valid [WAKE_W];
  ptag_t   wake_tag   [WAKE_W];
  logic [THREADS-1:0] flush;
  logic    issue_valid [ISSUE_W];
  issued_t issue       [ISSUE_W];
  logic    ent_valid [ENTRIES];
  logic    ent_lq    [ENTRIES];
  tid_t    ent_tid   [ENTRIES];
  logic [$clog2(ENTRIES+1)-1:0] count;

  int checks = 0;
  int failures = 0;
  int cyc = 0;
  int n_stall = 0, n_flushed = 0, n_lq_iid = 0, n_issued = 0;

  instruction_queue #(.ENTRIES(ENTRIES), .DISP_W(DISP_W), .ISSUE_W(ISSUE_W), .WAKE_W(WAKE_W))
    dut (.*);

  always #5 clk = ~clk;

  typedef struct {
    instr_t ins;
    bit     lq;
    int     dcyc;
  } rec_t;

  rec_t m_q[$];
  int   wake_cyc [256];

  function automatic bit m_ready(rec_t r, int c);
    bit r1, r2;
    r1 = r.ins.src_rdy[0] || (wake_cyc[r.ins.src1] >= 0 && wake_cyc[r.ins.src1] < c);
    r2 = r.ins.src_rdy[1] || (wake_cyc[r.ins.src2] >= 0 && wake_cyc[r.ins.src2] < c);
    return r1 && r2;
  endfunction

  task automatic fail(string msg);
    failures++;
    $display("FAIL cycle %0d: %s", cyc, msg);
  endtask

  task automatic clear_inputs();
    for (int d = 0; d < DISP_W; d++) begin
      disp_valid[d] = 1'b0; disp_ins[d] = '0; disp_lq[d] = 1'b0;
    end
    for (int w = 0; w < WAKE_W; w++) begin
      wake_valid[w] = 1'b0; wake_tag[w] = '0;
    end
    flush = '0;
  endtask

  task automatic reset_all();
    clear_inputs();
    rst_n = 1'b0;
    @(posedge clk);
    @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    m_q.delete();
    foreach (wake_cyc[t]) wake_cyc[t] = -1;
  endtask

  // one cycle of random traffic with the given wake and flush rates
  task automatic step(int wake_pct, int flush_pct);
    int  exp_idx [$];
    rec_t keep [$];
    int  n, s;
    clear_inputs();
    // dispatch group
    for (int d = 0; d < DISP_W; d++) begin
      disp_valid[d]       = ($urandom_range(0, 99) < 70);
      disp_ins[d].tid     = tid_t'($urandom_range(0, THREADS-1));
      disp_ins[d].pc      = pc_t'({$urandom, $urandom} & 64'hFFFF_FFFC);
      disp_ins[d].is_fp   = 1'b0;
      disp_ins[d].src1    = ptag_t'($urandom_range(0, 255));
      disp_ins[d].src2    = ptag_t'($urandom_range(0, 255));
      disp_ins[d].src_rdy[0] = ($urandom_range(0, 1) == 1) || wake_cyc[disp_ins[d].src1] >= 0;
      disp_ins[d].src_rdy[1] = ($urandom_range(0, 1) == 1) || wake_cyc[disp_ins[d].src2] >= 0;
      disp_ins[d].has_dst = 1'b1;
      disp_ins[d].dst     = ptag_t'($urandom_range(0, 255));
      disp_ins[d].seq     = seq_t'($urandom);
      disp_lq[d]          = ($urandom_range(0, 3) == 0);
    end
    for (int w = 0; w < WAKE_W; w++) begin
      wake_valid[w] = ($urandom_range(0, 99) < wake_pct);
      wake_tag[w]   = ptag_t'($urandom_range(0, 255));
    end
    if ($urandom_range(0, 99) < flush_pct) flush[$urandom_range(0, THREADS-1)] = 1'b1;
    #1;
    // compare outputs with the model state at the start of the cycle
    checks++;
    if (disp_ready !== (m_q.size() <= ENTRIES - DISP_W))
      fail($sformatf("disp_ready=%0b with %0d in queue", disp_ready, m_q.size()));
    checks++;
    if (int'(count) != m_q.size()) fail($sformatf("count=%0d model=%0d", count, m_q.size()));
    for (int e = 0; e < ENTRIES; e++) begin
      checks++;
      if (e < m_q.size()) begin
        if (!ent_valid[e] || ent_tid[e] != m_q[e].ins.tid || ent_lq[e] != m_q[e].lq)
          fail($sformatf("entry %0d view differs", e));
      end else if (ent_valid[e]) fail($sformatf("entry %0d valid, model has %0d", e, m_q.size()));
    end
    if (!disp_ready) n_stall++;
    // expected issue
    n = 0;
    foreach (m_q[i]) if (n < ISSUE_W && m_ready(m_q[i], cyc)) begin exp_idx.push_back(i); n++; end
    s = 0;
    foreach (exp_idx[k]) begin
      rec_t r = m_q[exp_idx[k]];
      int iid_e = (cyc - r.dcyc > 15) ? 15 : cyc - r.dcyc;
      if (flush[r.ins.tid]) begin
        checks++;
        if (issue_valid[k]) fail($sformatf("slot %0d issued a flushed instruction", k));
        continue;
      end
      checks++;
      if (!issue_valid[k]) fail($sformatf("slot %0d: nothing issued, expected seq %0h", k, r.ins.seq));
      else begin
        checks++;
        if (issue[k].ins !== r.ins || issue[k].lq_pred !== r.lq)
          fail($sformatf("slot %0d: issued seq %0h, expected seq %0h", k, issue[k].ins.seq, r.ins.seq));
        checks++;
        if (int'(issue[k].iid) != iid_e)
          fail($sformatf("slot %0d: IID %0d, expected %0d", k, issue[k].iid, iid_e));
        n_issued++;
        if (iid_e >= LQ_THRESH) n_lq_iid++;
      end
    end
    for (int k = exp_idx.size(); k < ISSUE_W; k++) begin
      checks++;
      if (issue_valid[k]) fail($sformatf("slot %0d issued unexpectedly", k));
    end
    @(posedge clk);
    // model update
    foreach (m_q[i]) begin
      bit issued = 1'b0;
      foreach (exp_idx[k]) if (exp_idx[k] == i) issued = 1'b1;
      if (flush[m_q[i].ins.tid]) begin
        if (!issued) n_flushed++;
      end else if (!issued) keep.push_back(m_q[i]);
    end
    for (int w = 0; w < WAKE_W; w++)
      if (wake_valid[w] && wake_cyc[wake_tag[w]] < 0) wake_cyc[wake_tag[w]] = cyc;
    if (m_q.size() <= ENTRIES - DISP_W)
      for (int d = 0; d < DISP_W; d++)
        if (disp_valid[d] && !flush[disp_ins[d].tid])
          keep.push_back('{ins: disp_ins[d], lq: disp_lq[d], dcyc: cyc});
    m_q = keep;
    cyc++;
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int epoch = 0; epoch < 8; epoch++) begin
      reset_all();
      // slow wakeup first: the queue fills and dispatch stalls
      for (int i = 0; i < 150; i++) step(3, (epoch % 2 != 0) ? 4 : 0);
      // then fast wakeup: it drains
      for (int i = 0; i < 150; i++) step(60, 0);
    end
    $display("issued=%0d iid>=5: %0d dispatch stalls=%0d flushed=%0d",
             n_issued, n_lq_iid, n_stall, n_flushed);
    checks++; if (n_stall == 0)   fail("dispatch never stalled");
    checks++; if (n_flushed == 0) fail("flush never removed an instruction");
    checks++; if (n_lq_iid == 0)  fail("no instruction reached the LQ threshold");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
