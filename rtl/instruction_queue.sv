// instruction_queue: out-of-order instruction queue that measures each
// instruction's issue delay (IID).
//
// Instructions wait here from dispatch until both source operands are
// available, then issue. The IID of an instruction is the number of cycles
// it spends in the queue; the queue counts it per entry and hands it out
// with the issued instruction, so that it can travel to commit and train
// the IID-table. The queue also exports, per entry, the valid bit, thread
// and "predicted LQ" bit, from which the per-thread count of predicted
// low-quality instructions is formed.
//
// The 64 entries and the issue widths (6 integer, 4 floating point, one
// instance each) follow the processor this logic was designed for; how the
// queue works inside is this design's own choice:
//   * Collapsing queue: every cycle the entries that stay are compacted
//     towards entry 0 and newly dispatched instructions are appended behind
//     them, so entry order is age order.
//   * Select: the ISSUE_W oldest entries whose two source-ready bits are set
//     issue (one functional unit per issue slot, fully pipelined).
//   * Wakeup: a tag on wake_tag in cycle t sets the matching source-ready
//     bits at the end of cycle t, in the queue and in instructions being
//     dispatched in cycle t; a dependant can issue in cycle t+1.
//   * IID: an instruction written at clock edge k carries IID = 1 in cycle
//     k+1 and gains one per cycle it stays; the value shown with the issued
//     instruction is the number of cycles it was in the queue, including the
//     cycle it issues in. It saturates at 2**IID_W-1.
//   * Dispatch: up to DISP_W instructions per cycle, accepted only while
//     disp_ready is high (at least DISP_W free entries at the start of the
//     cycle). flush[t] drops every instruction of thread t, in the queue, at
//     dispatch and at issue, in the same cycle.
// Reset is synchronous and active low; it empties the queue.
module instruction_queue
  import lq_pkg::*;
#(
  parameter int ENTRIES = 64,
  parameter int DISP_W  = 8,
  parameter int ISSUE_W = 6,
  parameter int WAKE_W  = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  // dispatch
  input  logic    disp_valid [DISP_W],
  input  instr_t  disp_ins   [DISP_W],
  input  logic    disp_lq    [DISP_W],
  output logic    disp_ready,
  // result tags that become available
  input  logic    wake_valid [WAKE_W],
  input  ptag_t   wake_tag   [WAKE_W],
  // per-thread squash
  input  logic [THREADS-1:0] flush,
  // issue
  output logic    issue_valid [ISSUE_W],
  output issued_t issue       [ISSUE_W],
  // contents, for the LQ counters
  output logic    ent_valid [ENTRIES],
  output logic    ent_lq    [ENTRIES],
  output tid_t    ent_tid   [ENTRIES],
  output logic [$clog2(ENTRIES+1)-1:0] count
);

  localparam int CNT_W = $clog2(ENTRIES+1);

  typedef struct packed {
    logic       valid;
    instr_t     ins;
    logic       lq;
    logic [1:0] rdy;
    iid_t       iid;
  } entry_t;

  entry_t q_q [ENTRIES];
  entry_t q_d [ENTRIES];
  logic   sel [ENTRIES];
  logic [CNT_W-1:0] count_q, count_d;

  function automatic logic woken(ptag_t t, logic wv [WAKE_W], ptag_t wt [WAKE_W]);
    logic hit;
    hit = 1'b0;
    for (int w = 0; w < WAKE_W; w++) hit |= wv[w] && (wt[w] == t);
    return hit;
  endfunction

  function automatic iid_t iid_inc(iid_t v);
    return (v == '1) ? v : v + 1'b1;
  endfunction

  // Select the ISSUE_W oldest ready entries.
  always_comb begin
    int n;
    n = 0;
    for (int s = 0; s < ISSUE_W; s++) begin
      issue_valid[s] = 1'b0;
      issue[s]       = '0;
    end
    for (int e = 0; e < ENTRIES; e++) begin
      sel[e] = 1'b0;
      if (q_q[e].valid && (q_q[e].rdy == 2'b11) && n < ISSUE_W) begin
        sel[e] = 1'b1;
        if (!flush[q_q[e].ins.tid]) begin
          issue_valid[n]   = 1'b1;
          issue[n].ins     = q_q[e].ins;
          issue[n].lq_pred = q_q[e].lq;
          issue[n].iid     = q_q[e].iid;
        end
        n++;
      end
    end
  end

  // Next state: compact survivors, then append dispatched instructions.
  always_comb begin
    int wp;
    entry_t ne;
    wp = 0;
    ne = '0;
    count_d = '0;
    for (int e = 0; e < ENTRIES; e++) q_d[e] = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (q_q[e].valid && !sel[e] && !flush[q_q[e].ins.tid]) begin
        ne        = q_q[e];
        ne.iid    = iid_inc(q_q[e].iid);
        ne.rdy[0] = q_q[e].rdy[0] | woken(q_q[e].ins.src1, wake_valid, wake_tag);
        ne.rdy[1] = q_q[e].rdy[1] | woken(q_q[e].ins.src2, wake_valid, wake_tag);
        q_d[wp]   = ne;
        wp++;
      end
    end
    for (int d = 0; d < DISP_W; d++) begin
      if (disp_ready && disp_valid[d] && !flush[disp_ins[d].tid]) begin
        ne.valid  = 1'b1;
        ne.ins    = disp_ins[d];
        ne.lq     = disp_lq[d];
        ne.iid    = iid_t'(1);
        ne.rdy[0] = disp_ins[d].src_rdy[0] | woken(disp_ins[d].src1, wake_valid, wake_tag);
        ne.rdy[1] = disp_ins[d].src_rdy[1] | woken(disp_ins[d].src2, wake_valid, wake_tag);
        q_d[wp]   = ne;
        wp++;
      end
    end
    count_d = CNT_W'(wp);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) q_q[e] <= '0;
      count_q <= '0;
    end else begin
      for (int e = 0; e < ENTRIES; e++) q_q[e] <= q_d[e];
      count_q <= count_d;
    end
  end

  assign disp_ready = (int'(count_q) <= ENTRIES - DISP_W);
  assign count      = count_q;

  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      ent_valid[e] = q_q[e].valid;
      ent_lq[e]    = q_q[e].lq;
      ent_tid[e]   = q_q[e].ins.tid;
    end
  end

endmodule
