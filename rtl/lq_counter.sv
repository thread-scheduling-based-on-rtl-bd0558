// lq_counter: per-thread number of predicted low-quality (LQ) instructions
// waiting in the instruction queues.
//
// The Low-LQ fetch policy ranks threads by how many of their instructions in
// the instruction queues were predicted LQ at dispatch. This block forms
// that number for every thread from the queues' per-entry valid, thread and
// predicted-LQ bits (the integer and floating-point queues concatenated into
// one N-entry view). Counting the contents directly, rather than keeping
// increment/decrement counters, keeps the count exact under issue, dispatch
// and squash alike; that is this design's choice.
//
// Timing: the counts are registered, so lq_count in cycle t+1 describes the
// queue contents in cycle t. Synchronous active-low reset clears them.
module lq_counter
  import lq_pkg::*;
#(
  parameter int N = 128,
  parameter int NTHREADS = THREADS,
  localparam int CNT_W = $clog2(N+1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ent_valid [N],
  input  logic             ent_lq    [N],
  input  tid_t             ent_tid   [N],
  output logic [CNT_W-1:0] lq_count  [NTHREADS]
);

  logic [CNT_W-1:0] cnt_d [NTHREADS];

  always_comb begin
    for (int t = 0; t < NTHREADS; t++) begin
      cnt_d[t] = '0;
      for (int e = 0; e < N; e++) begin
        if (ent_valid[e] && ent_lq[e] && int'(ent_tid[e]) == t) cnt_d[t] += 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int t = 0; t < NTHREADS; t++) begin
      if (!rst_n) lq_count[t] <= '0;
      else        lq_count[t] <= cnt_d[t];
    end
  end

endmodule
