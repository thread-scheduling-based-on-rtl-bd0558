// lq_pkg: widths, constants and record types shared by the low-quality (LQ)
// instruction predictor and the Low-LQ fetch scheduler.
//
// An instruction is "low quality" when its issue delay (IID), the number of
// cycles it waits in an instruction queue between dispatch and issue, is at
// least LQ_THRESH = 5. The threshold, the 64-entry predictor table, the two
// 64-entry queues and the 6 integer / 4 FP issue slots follow the processor
// this logic was designed for. The widths of the PC, physical register tags,
// the per-instruction sequence tag and the IID counter are this design's own
// choices: a 64-bit PC with 4-byte instructions, 8-bit physical tags (enough
// for 4 x 32 architectural + 100 renaming registers), an 8-bit sequence tag
// that the (external) reorder buffer uses to match issue and commit, and a
// 4-bit saturating IID counter (0..15), which is ample for a threshold of 5.
package lq_pkg;

  // Number of hardware thread contexts.
  localparam int THREADS   = 4;
  localparam int TID_W     = $clog2(THREADS);
  // Program counter width and the byte offset of one instruction.
  localparam int PC_W      = 64;
  // Physical register tag width.
  localparam int PTAG_W    = 8;
  // Opaque sequence tag carried from dispatch to issue (e.g. a ROB index).
  localparam int SEQ_W     = 8;
  // Issue delay counter width; the counter saturates at 2**IID_W-1.
  localparam int IID_W     = 4;
  // An instruction with IID >= LQ_THRESH is low quality.
  localparam int LQ_THRESH = 5;

  typedef logic [TID_W-1:0]  tid_t;
  typedef logic [PC_W-1:0]   pc_t;
  typedef logic [PTAG_W-1:0] ptag_t;
  typedef logic [SEQ_W-1:0]  seq_t;
  typedef logic [IID_W-1:0]  iid_t;

  // An instruction as it leaves register renaming and enters dispatch.
  typedef struct packed {
    tid_t       tid;      // thread it belongs to
    pc_t        pc;       // its program counter
    logic       is_fp;    // goes to the floating-point queue
    ptag_t      src1;     // first source physical register
    ptag_t      src2;     // second source physical register
    logic [1:0] src_rdy;  // source operands already available at dispatch
    logic       has_dst;  // writes a destination register
    ptag_t      dst;      // destination physical register
    seq_t       seq;      // sequence tag, returned with the issued instruction
  } instr_t;

  // An instruction leaving an instruction queue.
  typedef struct packed {
    instr_t ins;
    logic   lq_pred;  // predicted low quality at dispatch
    iid_t   iid;      // measured issue delay in cycles (saturating)
  } issued_t;

  // One instruction reaching commit: what the IID-table needs.
  typedef struct packed {
    pc_t  pc;
    iid_t iid;
  } commit_t;

endpackage
