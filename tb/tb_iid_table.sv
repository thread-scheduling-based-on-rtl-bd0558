// tb_iid_table: self-checking testbench for iid_table.
//
// A reference model of the table (an array of valid bits and PC tags,
// indexed and tagged the same way, updated commit slot by commit slot) is
// kept beside the block. The test first runs directed cases (store on
// IID >= 5, hit at lookup, removal on IID < 5, no store at IID = 4, a
// conflicting PC replacing an entry, two commits of one PC in one cycle
// where the younger wins) and then random traffic with a small PC pool so
// that entries alias. Every cycle all lookup ports and the occupancy are
// compared with the model. Lookups are combinational and updates land at
// the next clock edge, which the checks also cover.
module tb_iid_table;
  import lq_pkg::*;

  localparam int ENTRIES  = 64;
  localparam int LOOKUP_W = 8;
  localparam int COMMIT_W = 12;

  logic    clk = 1'b0;
  logic    rst_n;
  pc_t     lookup_pc    [LOOKUP_W];
  logic    lookup_hit   [LOOKUP_W];
  logic    commit_valid [COMMIT_W];
  commit_t commit       [COMMIT_W];
  logic [$clog2(ENTRIES+1)-1:0] occupancy;

  int checks = 0;
  int failures = 0;

  iid_table dut (.*);

  always #5 clk = ~clk;

  // reference model
  bit      m_valid [ENTRIES];
  pc_t     m_pc    [ENTRIES];

  function automatic int idx_of(pc_t pc);
    return int'(pc[7:2]);
  endfunction

  function automatic bit m_hit(pc_t pc);
    return m_valid[idx_of(pc)] && m_pc[idx_of(pc)] == pc;
  endfunction

  task automatic m_update();
    for (int c = 0; c < COMMIT_W; c++) begin
      if (commit_valid[c]) begin
        if (commit[c].iid >= 5) begin
          m_valid[idx_of(commit[c].pc)] = 1'b1;
          m_pc[idx_of(commit[c].pc)]    = commit[c].pc;
        end else if (m_hit(commit[c].pc)) begin
          m_valid[idx_of(commit[c].pc)] = 1'b0;
        end
      end
    end
  endtask

  function automatic int m_occ();
    int n = 0;
    foreach (m_valid[e]) n += int'(m_valid[e]);
    return n;
  endfunction

  task automatic check_lookups(string what);
    for (int l = 0; l < LOOKUP_W; l++) begin
      checks++;
      if (lookup_hit[l] !== m_hit(lookup_pc[l])) begin
        failures++;
        $display("FAIL %s: lookup %0d pc=%h hit=%0b expected %0b", what, l,
                 lookup_pc[l], lookup_hit[l], m_hit(lookup_pc[l]));
      end
    end
    checks++;
    if (int'(occupancy) != m_occ()) begin
      failures++;
      $display("FAIL %s: occupancy %0d expected %0d", what, occupancy, m_occ());
    end
  endtask

  task automatic clear_inputs();
    for (int c = 0; c < COMMIT_W; c++) begin
      commit_valid[c] = 1'b0;
      commit[c]       = '0;
    end
    for (int l = 0; l < LOOKUP_W; l++) lookup_pc[l] = '0;
  endtask

  // one cycle: inputs are set by the caller, compare at the falling edge,
  // then let the rising edge apply the commits
  task automatic cycle(string what);
    #1 check_lookups(what);
    @(posedge clk);
    m_update();
    @(negedge clk);
  endtask

  function automatic pc_t rand_pc();
    // 96 distinct PCs: 1.5 per entry, so entries alias
    int k = $urandom_range(0, 95);
    return pc_t'(64'h0000_0001_2000_0000 + 64'(k % 64) * 4 + 64'(k / 64) * 64'h1000);
  endfunction

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pc_t a, b;
    foreach (m_valid[e]) m_valid[e] = 1'b0;
    foreach (m_pc[e])    m_pc[e] = '0;
    clear_inputs();
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    a = 64'h0000_0001_2000_0040; // index 16
    b = 64'h0000_0001_2000_1040; // same index, other tag

    // empty table: no hit
    lookup_pc[0] = a;
    cycle("empty");
    checks++; if (lookup_hit[0]) begin failures++; $display("FAIL empty table hit"); end

    // IID = 4 is not low quality: not stored
    commit_valid[0] = 1'b1; commit[0] = '{pc: a, iid: iid_t'(4)};
    cycle("iid4");
    clear_inputs(); lookup_pc[0] = a;
    #1 checks++; if (lookup_hit[0]) begin failures++; $display("FAIL IID 4 stored"); end
    cycle("after iid4");

    // IID = 5 is low quality: stored, hit from the next cycle on
    commit_valid[3] = 1'b1; commit[3] = '{pc: a, iid: iid_t'(5)};
    lookup_pc[0] = a;
    #1 checks++; if (lookup_hit[0]) begin failures++; $display("FAIL hit before the update edge"); end
    cycle("store");
    clear_inputs(); lookup_pc[0] = a; lookup_pc[1] = b;
    #1 checks++; if (!lookup_hit[0] || lookup_hit[1]) begin
      failures++; $display("FAIL store: hit a=%0b b=%0b", lookup_hit[0], lookup_hit[1]);
    end
    cycle("after store");

    // an aliasing PC with IID >= 5 replaces it
    commit_valid[0] = 1'b1; commit[0] = '{pc: b, iid: iid_t'(9)};
    cycle("replace");
    clear_inputs(); lookup_pc[0] = a; lookup_pc[1] = b;
    #1 checks++; if (lookup_hit[0] || !lookup_hit[1]) begin
      failures++; $display("FAIL replace: hit a=%0b b=%0b", lookup_hit[0], lookup_hit[1]);
    end
    cycle("after replace");

    // IID < 5 of a different PC at the same index does not remove b
    commit_valid[0] = 1'b1; commit[0] = '{pc: a, iid: iid_t'(1)};
    cycle("no remove");
    clear_inputs(); lookup_pc[0] = b;
    #1 checks++; if (!lookup_hit[0]) begin failures++; $display("FAIL other PC removed entry"); end
    cycle("after no remove");

    // IID < 5 of b removes it
    commit_valid[7] = 1'b1; commit[7] = '{pc: b, iid: iid_t'(2)};
    cycle("remove");
    clear_inputs(); lookup_pc[0] = b;
    #1 checks++; if (lookup_hit[0]) begin failures++; $display("FAIL remove"); end
    cycle("after remove");

    // same PC twice in one cycle: the younger (higher slot) wins
    commit_valid[2] = 1'b1; commit[2] = '{pc: a, iid: iid_t'(7)};
    commit_valid[5] = 1'b1; commit[5] = '{pc: a, iid: iid_t'(0)};
    cycle("order 1");
    clear_inputs(); lookup_pc[0] = a;
    #1 checks++; if (lookup_hit[0]) begin failures++; $display("FAIL order: older store won"); end
    cycle("after order 1");
    commit_valid[2] = 1'b1; commit[2] = '{pc: a, iid: iid_t'(0)};
    commit_valid[5] = 1'b1; commit[5] = '{pc: a, iid: iid_t'(15)};
    cycle("order 2");
    clear_inputs(); lookup_pc[0] = a;
    #1 checks++; if (!lookup_hit[0]) begin failures++; $display("FAIL order: older remove won"); end
    cycle("after order 2");

    // random traffic
    for (int i = 0; i < 3000; i++) begin
      clear_inputs();
      for (int l = 0; l < LOOKUP_W; l++) lookup_pc[l] = rand_pc();
      for (int c = 0; c < COMMIT_W; c++) begin
        commit_valid[c] = ($urandom_range(0, 3) != 0);
        commit[c].pc    = rand_pc();
        commit[c].iid   = iid_t'($urandom_range(0, 9));
      end
      cycle("random");
    end

    // reset empties the table
    clear_inputs();
    rst_n = 1'b0;
    @(posedge clk);
    foreach (m_valid[e]) m_valid[e] = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int l = 0; l < LOOKUP_W; l++) lookup_pc[l] = rand_pc();
    cycle("after reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
