// cfd_pkg: constants and types shared by the control-flow decoupling (CFD)
// fetch-unit blocks.
//
// The numbers are those of the evaluated core: a 128-entry branch queue (BQ)
// whose entries are 6 bits wide, a 128-entry value-queue (VQ) renamer holding
// 8-bit physical register mappings (236 physical registers), 8 branch
// checkpoints, a 4-wide fetch bundle and a 4K-entry 4-way BTB.
//
// A BQ entry holds the software-visible predicate plus three pieces of
// microarchitectural state: the pushed bit, the popped bit and the id of the
// checkpoint taken by a speculative pop. With 8 checkpoints that is
// 1 + 1 + 1 + 3 = 6 bits, which matches the 6-bit entry size of the
// evaluated BQ. The field order inside the entry is this design's choice.
package cfd_pkg;

  localparam int unsigned BQ_SIZE     = 128;  // BQ entries
  localparam int unsigned VQ_SIZE     = 128;  // VQ renamer entries
  localparam int unsigned NUM_CKPT    = 8;    // branch checkpoints
  localparam int unsigned CKPT_W      = $clog2(NUM_CKPT);
  localparam int unsigned FETCH_W     = 4;    // instructions per fetch bundle
  localparam int unsigned NUM_PREG    = 236;  // physical registers
  localparam int unsigned PREG_W      = 8;    // VQ renamer mapping width
  localparam int unsigned BTB_ENTRIES = 4096;
  localparam int unsigned BTB_WAYS    = 4;
  localparam int unsigned PC_W        = 64;   // Alpha virtual address width

  // One BQ entry (6 bits).
  typedef struct packed {
    logic              pred;    // predicate: pushed value or predicted value
    logic              pushed;  // the push has executed
    logic              popped;  // a speculative pop has consumed the entry
    logic [CKPT_W-1:0] ckpt;    // checkpoint id of the speculative pop
  } bq_entry_t;

  // Branch kinds the BTB distinguishes.
  typedef enum logic [1:0] {
    BR_COND = 2'd0,   // ordinary conditional branch (direction from predictor)
    BR_JUMP = 2'd1,   // unconditional transfer (always taken)
    BR_BQ   = 2'd2    // Branch_on_BQ (direction from the BQ)
  } br_type_t;

endpackage
