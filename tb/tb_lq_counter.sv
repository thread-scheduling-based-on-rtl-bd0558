// tb_lq_counter: self-checking testbench for lq_counter.
//
// Drives random queue views (valid, thread and predicted-LQ bit per entry,
// 128 entries as in the two 64-entry queues together) and, one clock later,
// compares the per-thread counts with counts formed independently in the
// testbench. Directed cases cover an empty view, a full view of one thread
// with every entry predicted LQ (the largest count, 128), and valid entries
// that are not predicted LQ (not counted). The one-cycle latency is checked
// by holding the count of the previous view while a new one is applied.
module tb_lq_counter;
  import lq_pkg::*;

  localparam int N = 128;
  localparam int CNT_W = $clog2(N+1);

  logic clk = 1'b0;
  logic rst_n;
  logic ent_valid [N];
  logic ent_lq    [N];
  tid_t ent_tid   [N];
  logic [CNT_W-1:0] lq_count [THREADS];

  int checks = 0;
  int failures = 0;
  int expected [THREADS];
  int prev     [THREADS];

  lq_counter #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic apply(int pv, int pl, int fixed_tid);
    foreach (expected[t]) begin prev[t] = expected[t]; expected[t] = 0; end
    for (int e = 0; e < N; e++) begin
      ent_valid[e] = ($urandom_range(0, 99) < pv);
      ent_lq[e]    = ($urandom_range(0, 99) < pl);
      ent_tid[e]   = (fixed_tid >= 0) ? tid_t'(fixed_tid) : tid_t'($urandom_range(0, THREADS-1));
      if (ent_valid[e] && ent_lq[e]) expected[ent_tid[e]]++;
    end
    #1;
    // registered: still the previous view's counts
    foreach (prev[t]) begin
      checks++;
      if (int'(lq_count[t]) != prev[t]) begin
        failures++;
        $display("FAIL thread %0d: count %0d before the edge, expected %0d", t, lq_count[t], prev[t]);
      end
    end
    @(posedge clk);
    @(negedge clk);
    foreach (expected[t]) begin
      checks++;
      if (int'(lq_count[t]) != expected[t]) begin
        failures++;
        $display("FAIL thread %0d: count %0d, expected %0d", t, lq_count[t], expected[t]);
      end
    end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (expected[t]) expected[t] = 0;
    for (int e = 0; e < N; e++) begin ent_valid[e] = 1'b0; ent_lq[e] = 1'b0; ent_tid[e] = '0; end
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    apply(0, 100, -1);     // empty
    apply(100, 100, 2);    // all thread 2, all LQ: 128
    apply(100, 0, -1);     // valid but none predicted LQ
    apply(100, 100, 3);
    for (int i = 0; i < 2000; i++) apply($urandom_range(0, 100), $urandom_range(0, 100), -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
