// lowlq_fetch_scheduler: Low-LQ fetch thread selection.
//
// Each cycle the fetch unit may fetch FETCH_W (8) instructions from up to
// FETCH_THREADS (2) threads. This block decides which threads: among the
// threads that can fetch this cycle, those with the fewest predicted
// low-quality (LQ) instructions in the instruction queues come first, since
// their instructions leave the queues sooner and free the shared resources
// for others. The first chosen thread gets as many of the FETCH_W slots as
// it can use (fetch_avail), the next one the rest. The priority rule, the
// 8 instructions per cycle and the 2 threads per cycle follow the original
// design.
//
// This design's own choices: a thread is a candidate when thread_active is
// set and fetch_avail (the instructions it can supply this cycle, e.g. up to
// the end of its cache line or a taken branch) is non-zero. Equal LQ counts
// are broken by a round-robin pointer that advances by one every cycle: the
// thread at or after the pointer wins. A chosen thread is reported only if
// it gets at least one slot.
//
// Timing: the selection is combinational from lq_count, thread_active and
// fetch_avail; only the round-robin pointer is a register. Synchronous
// active-low reset sets the pointer to thread 0.
module lowlq_fetch_scheduler
  import lq_pkg::*;
#(
  parameter int NTHREADS      = THREADS,
  parameter int FETCH_THREADS = 2,
  parameter int FETCH_W       = 8,
  parameter int CNT_W         = 8,
  localparam int NT_W = (NTHREADS > 1) ? $clog2(NTHREADS) : 1,
  localparam int FW_W = $clog2(FETCH_W+1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] lq_count      [NTHREADS],
  input  logic             thread_active [NTHREADS],
  input  logic [FW_W-1:0]  fetch_avail   [NTHREADS],
  output logic             sel_valid     [FETCH_THREADS],
  output logic [NT_W-1:0]  sel_tid       [FETCH_THREADS],
  output logic [FW_W-1:0]  sel_n         [FETCH_THREADS]
);

  logic [NT_W-1:0] rr_q;

  always_comb begin
    logic [NTHREADS-1:0] used;
    int   slots;
    int   best;
    logic [CNT_W+NT_W-1:0] best_key, key;
    used  = '0;
    slots = FETCH_W;
    for (int f = 0; f < FETCH_THREADS; f++) begin
      best     = -1;
      best_key = '1;
      for (int t = 0; t < NTHREADS; t++) begin
        // priority key: LQ count, then distance from the round-robin pointer
        key = {lq_count[t], NT_W'((t - int'(rr_q) + NTHREADS) % NTHREADS)};
        if (thread_active[t] && fetch_avail[t] != '0 && !used[t] &&
            (best < 0 || key < best_key)) begin
          best     = t;
          best_key = key;
        end
      end
      sel_valid[f] = 1'b0;
      sel_tid[f]   = '0;
      sel_n[f]     = '0;
      if (best >= 0 && slots > 0) begin
        used[best]   = 1'b1;
        sel_valid[f] = 1'b1;
        sel_tid[f]   = NT_W'(best);
        sel_n[f]     = (int'(fetch_avail[best]) < slots) ? fetch_avail[best] : FW_W'(slots);
        slots        = slots - int'(sel_n[f]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)                       rr_q <= '0;
    else if (int'(rr_q) == NTHREADS-1) rr_q <= '0;
    else                              rr_q <= rr_q + 1'b1;
  end

endmodule
