// iid_table: PC-indexed table that predicts low-quality (LQ) instructions.
//
// The table remembers the PCs of instructions that recently waited at least
// LQ_THRESH (5) cycles in an instruction queue. At dispatch, each of the
// LOOKUP_W instructions probes the table and is predicted LQ when its PC is
// present. At commit, each of the COMMIT_W retiring instructions updates it:
// with an issue delay (IID) >= LQ_THRESH its PC is stored (if not already
// there), with a smaller IID its PC is removed (if there). The 64-entry size,
// the threshold, the probe-at-dispatch / update-at-commit rule and the 12
// commits per cycle follow the original design.
//
// Organisation (this design's choice): direct mapped. PC bits
// [IDX_LSB +: log2(ENTRIES)] select the entry; the remaining upper PC bits
// are kept as a tag so that "found" means an exact PC match. Storing a PC
// whose entry holds another PC replaces it. When several commits in one
// cycle touch the same entry, they are applied in slot order (slot 0 is the
// oldest), so the youngest wins.
//
// Timing: lookups are combinational from lookup_pc to lookup_hit and see the
// table as of the start of the cycle. Updates take effect at the next rising
// clock edge. Synchronous active-low reset empties the table.
module iid_table
  import lq_pkg::*;
#(
  parameter int ENTRIES   = 64,
  parameter int LOOKUP_W  = 8,
  parameter int COMMIT_W  = 12,
  parameter int IDX_LSB   = 2,
  parameter int THRESHOLD = LQ_THRESH
) (
  input  logic    clk,
  input  logic    rst_n,
  // dispatch-stage probe
  input  pc_t     lookup_pc    [LOOKUP_W],
  output logic    lookup_hit   [LOOKUP_W],
  // commit-stage update
  input  logic    commit_valid [COMMIT_W],
  input  commit_t commit       [COMMIT_W],
  // number of valid entries, for observation
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);

  localparam int IDX_W = $clog2(ENTRIES);
  localparam int TAG_W = PC_W - IDX_LSB - IDX_W;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  logic valid_q [ENTRIES];
  tag_t tag_q   [ENTRIES];
  logic valid_d [ENTRIES];
  tag_t tag_d   [ENTRIES];

  // PC bits [IDX_LSB +: IDX_W] index the table, the bits above are the tag;
  // PC bits below IDX_LSB are always zero for aligned instructions.
  idx_t lk_idx [LOOKUP_W];
  tag_t lk_tag [LOOKUP_W];
  idx_t cm_idx [COMMIT_W];
  tag_t cm_tag [COMMIT_W];
  logic [IDX_LSB-1:0] unused_lsbs;

  always_comb begin
    unused_lsbs = '0;
    for (int l = 0; l < LOOKUP_W; l++) begin
      {lk_tag[l], lk_idx[l]} = lookup_pc[l][PC_W-1:IDX_LSB];
      unused_lsbs |= lookup_pc[l][IDX_LSB-1:0];
    end
    for (int c = 0; c < COMMIT_W; c++) begin
      {cm_tag[c], cm_idx[c]} = commit[c].pc[PC_W-1:IDX_LSB];
      unused_lsbs |= commit[c].pc[IDX_LSB-1:0];
    end
  end

  // Probe
  always_comb begin
    for (int l = 0; l < LOOKUP_W; l++) begin
      lookup_hit[l] = valid_q[lk_idx[l]] && (tag_q[lk_idx[l]] == lk_tag[l]);
    end
  end

  // Update: commits applied in slot order.
  always_comb begin
    for (int e = 0; e < ENTRIES; e++) begin
      valid_d[e] = valid_q[e];
      tag_d[e]   = tag_q[e];
    end
    for (int c = 0; c < COMMIT_W; c++) begin
      if (commit_valid[c]) begin
        if (int'(commit[c].iid) >= THRESHOLD) begin
          valid_d[cm_idx[c]] = 1'b1;
          tag_d[cm_idx[c]]   = cm_tag[c];
        end else if (valid_d[cm_idx[c]] && tag_d[cm_idx[c]] == cm_tag[c]) begin
          valid_d[cm_idx[c]] = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    for (int e = 0; e < ENTRIES; e++) begin
      if (!rst_n) begin
        valid_q[e] <= 1'b0;
        tag_q[e]   <= '0;
      end else begin
        valid_q[e] <= valid_d[e];
        tag_q[e]   <= tag_d[e];
      end
    end
  end

  always_comb begin
    occupancy = '0;
    for (int e = 0; e < ENTRIES; e++) occupancy += ($bits(occupancy))'(valid_q[e]);
  end

endmodule
