// lq_smt_sched_top: low-quality instruction prediction and Low-LQ fetch
// scheduling for a simultaneous multithreaded (SMT) processor.
//
// Instructions that wait long in the instruction queue (an issue delay, IID,
// of 5 cycles or more) are "low quality": they hold queue entries and delay
// their dependants. This block predicts them and uses the prediction to
// choose which threads fetch:
//   1. Dispatch: each instruction's PC probes the IID-table; a hit marks it
//      predicted-LQ. It then enters the integer or the floating-point
//      instruction queue.
//   2. The queues count each instruction's IID until it issues, and hand it
//      out with the issued instruction.
//   3. Commit: the reorder buffer (outside this block) returns PC and IID of
//      each retiring instruction; the IID-table stores PCs with IID >= 5 and
//      removes PCs with IID < 5.
//   4. The number of predicted-LQ instructions of each thread in the two
//      queues is counted, and the fetch scheduler gives the fetch slots to
//      the threads with the fewest.
// Fetch, caches, decode, renaming, the register files, the functional units
// and the reorder buffer belong to the surrounding processor; their signals
// are this block's ports.
//
// Interface and timing:
//   * disp_*: up to DISP_W renamed instructions per cycle, taken in a cycle
//     where disp_ready is high. disp_lq_pred shows each one's prediction.
//   * int_issue_* / fp_issue_*: instructions issued this cycle (6 integer, 4
//     FP), with predicted-LQ bit and measured IID.
//   * wake_*: result tags broadcast by the functional units; a dependant can
//     issue the cycle after its last operand's tag appears here.
//   * commit_*: up to COMMIT_W retiring instructions per cycle; the IID-table
//     is updated at the clock edge that ends the cycle.
//   * flush: squashes a thread's instructions in both queues.
//   * thread_active / fetch_avail / fetch_*: fetch thread selection, made
//     each cycle from the LQ counts of the previous cycle.
// All sizes default to the configuration the scheme was designed for;
// DISP_W (= fetch width) and WAKE_W (= one tag per functional unit) are this
// design's choices.
module lq_smt_sched_top
  import lq_pkg::*;
#(
  parameter int IQ_ENTRIES    = 64,
  parameter int TABLE_ENTRIES = 64,
  parameter int DISP_W        = 8,
  parameter int INT_ISSUE_W   = 6,
  parameter int FP_ISSUE_W    = 4,
  parameter int COMMIT_W      = 12,
  parameter int WAKE_W        = INT_ISSUE_W + FP_ISSUE_W,
  parameter int FETCH_THREADS = 2,
  parameter int FETCH_W       = 8,
  localparam int LQC_W = $clog2(2*IQ_ENTRIES+1),
  localparam int FW_W  = $clog2(FETCH_W+1)
) (
  input  logic    clk,
  input  logic    rst_n,
  // dispatch
  input  logic    disp_valid   [DISP_W],
  input  instr_t  disp_ins     [DISP_W],
  output logic    disp_ready,
  output logic    disp_lq_pred [DISP_W],
  // issue
  output logic    int_issue_valid [INT_ISSUE_W],
  output issued_t int_issue       [INT_ISSUE_W],
  output logic    fp_issue_valid  [FP_ISSUE_W],
  output issued_t fp_issue        [FP_ISSUE_W],
  // result tags from the functional units
  input  logic    wake_valid [WAKE_W],
  input  ptag_t   wake_tag   [WAKE_W],
  // commit
  input  logic    commit_valid [COMMIT_W],
  input  commit_t commit       [COMMIT_W],
  // squash
  input  logic [THREADS-1:0] flush,
  // fetch thread selection
  input  logic             thread_active [THREADS],
  input  logic [FW_W-1:0]  fetch_avail   [THREADS],
  output logic             fetch_valid   [FETCH_THREADS],
  output tid_t             fetch_tid     [FETCH_THREADS],
  output logic [FW_W-1:0]  fetch_n       [FETCH_THREADS],
  // observation
  output logic [LQC_W-1:0] lq_count      [THREADS],
  output logic [$clog2(TABLE_ENTRIES+1)-1:0] table_occupancy,
  output logic [$clog2(IQ_ENTRIES+1)-1:0]    int_iq_count,
  output logic [$clog2(IQ_ENTRIES+1)-1:0]    fp_iq_count
);

  pc_t  lookup_pc [DISP_W];
  logic int_disp_valid [DISP_W];
  logic fp_disp_valid  [DISP_W];
  logic int_ready, fp_ready;

  logic ent_valid [2*IQ_ENTRIES];
  logic ent_lq    [2*IQ_ENTRIES];
  tid_t ent_tid   [2*IQ_ENTRIES];

  always_comb begin
    for (int d = 0; d < DISP_W; d++) begin
      lookup_pc[d]      = disp_ins[d].pc;
      int_disp_valid[d] = disp_valid[d] && disp_ready && !disp_ins[d].is_fp;
      fp_disp_valid[d]  = disp_valid[d] && disp_ready &&  disp_ins[d].is_fp;
    end
  end

  // A dispatch group is taken only when both queues have room, so that a
  // group held back by one full queue is never half written; each queue then
  // takes the instructions of its own kind.
  assign disp_ready = int_ready && fp_ready;

  iid_table #(
    .ENTRIES  (TABLE_ENTRIES),
    .LOOKUP_W (DISP_W),
    .COMMIT_W (COMMIT_W)
  ) u_iid_table (
    .clk, .rst_n,
    .lookup_pc,
    .lookup_hit (disp_lq_pred),
    .commit_valid,
    .commit,
    .occupancy  (table_occupancy)
  );

  instruction_queue #(
    .ENTRIES (IQ_ENTRIES),
    .DISP_W  (DISP_W),
    .ISSUE_W (INT_ISSUE_W),
    .WAKE_W  (WAKE_W)
  ) u_int_iq (
    .clk, .rst_n,
    .disp_valid  (int_disp_valid),
    .disp_ins,
    .disp_lq     (disp_lq_pred),
    .disp_ready  (int_ready),
    .wake_valid,
    .wake_tag,
    .flush,
    .issue_valid (int_issue_valid),
    .issue       (int_issue),
    .ent_valid   (ent_valid[0:IQ_ENTRIES-1]),
    .ent_lq      (ent_lq[0:IQ_ENTRIES-1]),
    .ent_tid     (ent_tid[0:IQ_ENTRIES-1]),
    .count       (int_iq_count)
  );

  instruction_queue #(
    .ENTRIES (IQ_ENTRIES),
    .DISP_W  (DISP_W),
    .ISSUE_W (FP_ISSUE_W),
    .WAKE_W  (WAKE_W)
  ) u_fp_iq (
    .clk, .rst_n,
    .disp_valid  (fp_disp_valid),
    .disp_ins,
    .disp_lq     (disp_lq_pred),
    .disp_ready  (fp_ready),
    .wake_valid,
    .wake_tag,
    .flush,
    .issue_valid (fp_issue_valid),
    .issue       (fp_issue),
    .ent_valid   (ent_valid[IQ_ENTRIES:2*IQ_ENTRIES-1]),
    .ent_lq      (ent_lq[IQ_ENTRIES:2*IQ_ENTRIES-1]),
    .ent_tid     (ent_tid[IQ_ENTRIES:2*IQ_ENTRIES-1]),
    .count       (fp_iq_count)
  );

  lq_counter #(
    .N        (2*IQ_ENTRIES),
    .NTHREADS (THREADS)
  ) u_lq_counter (
    .clk, .rst_n,
    .ent_valid,
    .ent_lq,
    .ent_tid,
    .lq_count
  );

  lowlq_fetch_scheduler #(
    .NTHREADS      (THREADS),
    .FETCH_THREADS (FETCH_THREADS),
    .FETCH_W       (FETCH_W),
    .CNT_W         (LQC_W)
  ) u_sched (
    .clk, .rst_n,
    .lq_count,
    .thread_active,
    .fetch_avail,
    .sel_valid (fetch_valid),
    .sel_tid   (fetch_tid),
    .sel_n     (fetch_n)
  );

endmodule
