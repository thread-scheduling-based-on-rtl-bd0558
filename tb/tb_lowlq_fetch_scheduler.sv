// tb_lowlq_fetch_scheduler: self-checking testbench for lowlq_fetch_scheduler.
//
// The testbench keeps its own copy of the round-robin pointer (0 after
// reset, +1 per cycle, wrapping at 4) and, for each random or directed set
// of LQ counts, runnable threads and per-thread available instructions,
// works out the expected choice: candidates sorted by LQ count, equal counts
// ordered from the pointer on; the first gets min(avail, 8) slots, the
// second min(avail, rest). It compares thread, valid and slot count of both
// fetch slots. Directed cases: a clear winner, all counts equal (the
// pointer decides), a single runnable thread, no runnable thread, and a
// first thread that takes all 8 slots. It counts how often the fewest-LQ
// rule and the tie-break each decided and fails if one never did.
module tb_lowlq_fetch_scheduler;
  import lq_pkg::*;

  localparam int NT = 4;
  localparam int FT = 2;
  localparam int FW = 8;
  localparam int CNT_W = 8;

  logic            clk = 1'b0;
  logic            rst_n;
  logic [CNT_W-1:0] lq_count      [NT];
  logic            thread_active [NT];
  logic [3:0]      fetch_avail   [NT];
  logic            sel_valid     [FT];
  logic [1:0]      sel_tid       [FT];
  logic [3:0]      sel_n         [FT];

  int checks = 0;
  int failures = 0;
  int rr = 0;
  int n_by_count = 0, n_by_tie = 0;

  lowlq_fetch_scheduler #(.NTHREADS(NT), .FETCH_THREADS(FT), .FETCH_W(FW), .CNT_W(CNT_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check_cycle(string what);
    int order [$];
    int slots = FW;
    int ev [FT], et [FT], en [FT];
    // candidates in priority order (insertion sort)
    for (int t = 0; t < NT; t++) begin
      int kt, pos;
      if (!thread_active[t] || fetch_avail[t] == 0) continue;
      kt = int'(lq_count[t]) * NT + (t - rr + NT) % NT;
      pos = order.size();
      for (int i = 0; i < order.size(); i++) begin
        int ki = int'(lq_count[order[i]]) * NT + (order[i] - rr + NT) % NT;
        if (kt < ki) begin pos = i; break; end
      end
      order.insert(pos, t);
    end
    if (order.size() >= 2) begin
      if (lq_count[order[0]] != lq_count[order[1]]) n_by_count++; else n_by_tie++;
    end
    for (int f = 0; f < FT; f++) begin
      ev[f] = 0; et[f] = 0; en[f] = 0;
      if (f < order.size() && slots > 0) begin
        ev[f] = 1; et[f] = order[f];
        en[f] = (int'(fetch_avail[order[f]]) < slots) ? int'(fetch_avail[order[f]]) : slots;
        slots -= en[f];
      end
    end
    #1;
    for (int f = 0; f < FT; f++) begin
      checks++;
      if (int'(sel_valid[f]) != ev[f] || (ev[f] != 0 && (int'(sel_tid[f]) != et[f] || int'(sel_n[f]) != en[f]))) begin
        failures++;
        $display("FAIL %s slot %0d: valid=%0b tid=%0d n=%0d, expected valid=%0d tid=%0d n=%0d (rr=%0d)",
                 what, f, sel_valid[f], sel_tid[f], sel_n[f], ev[f], et[f], en[f], rr);
      end
    end
    @(posedge clk);
    rr = (rr + 1) % NT;
    @(negedge clk);
  endtask

  task automatic set(int c0, int c1, int c2, int c3, bit a0, bit a1, bit a2, bit a3,
                     int f0, int f1, int f2, int f3);
    lq_count[0] = CNT_W'(c0); lq_count[1] = CNT_W'(c1); lq_count[2] = CNT_W'(c2); lq_count[3] = CNT_W'(c3);
    thread_active[0] = a0; thread_active[1] = a1; thread_active[2] = a2; thread_active[3] = a3;
    fetch_avail[0] = 4'(f0); fetch_avail[1] = 4'(f1); fetch_avail[2] = 4'(f2); fetch_avail[3] = 4'(f3);
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set(0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0);
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    rr = 0;
    set(9, 2, 5, 7, 1, 1, 1, 1, 8, 3, 8, 8);  check_cycle("clear winner");   // t1 (3), t2 (5)
    for (int i = 0; i < 4; i++) begin
      set(4, 4, 4, 4, 1, 1, 1, 1, 4, 4, 4, 4); check_cycle("all equal");
    end
    set(1, 0, 0, 0, 1, 0, 0, 0, 6, 8, 8, 8);  check_cycle("one runnable");
    set(1, 0, 0, 0, 0, 1, 1, 1, 8, 0, 0, 0);  check_cycle("none runnable");
    set(0, 5, 6, 7, 1, 1, 1, 1, 8, 8, 8, 8);  check_cycle("first takes all");
    for (int i = 0; i < 3000; i++) begin
      for (int t = 0; t < NT; t++) begin
        lq_count[t]      = CNT_W'($urandom_range(0, 6));
        thread_active[t] = ($urandom_range(0, 9) != 0);
        fetch_avail[t]   = 4'($urandom_range(0, 8));
      end
      check_cycle("random");
    end
    $display("decided by LQ count: %0d, by tie-break: %0d", n_by_count, n_by_tie);
    checks++; if (n_by_count == 0) begin failures++; $display("FAIL LQ count never decided"); end
    checks++; if (n_by_tie == 0)   begin failures++; $display("FAIL tie-break never decided"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
