// fetch_select: next-fetch-address selection for one fetch bundle, with
// Branch_on_BQ resolved in the fetch stage from the branch queue.
//
// A bundle is the W aligned instructions holding the fetch address; slots
// before the address are not delivered. Walking the slots in program order:
//  * Push_BQ: takes the next BQ tail entry, unless the queue has no free slot
//    left for it. Then the bundle ends just before the push and fetch resumes
//    at the push next cycle (the BQ-full stall); it repeats until a pop
//    retires and frees an entry.
//  * Branch_on_BQ: takes the next BQ head entry. The W head entries are read
//    in parallel with the BTB, so the k-th pop of the bundle uses window entry
//    k. If the entry's pushed bit is set, its predicate decides the branch;
//    otherwise the pop is speculative and the predictor direction for the slot
//    is used and reported as the predicted predicate of that pop lane.
//    A taken Branch_on_BQ that hits in the BTB redirects fetch to the cached
//    target in the same cycle. A taken one that misses ends the bundle with
//    misfetch set: its target is only known when the instruction is decoded
//    in the next cycle, costing one fetch cycle.
//  * Other branches found in the BTB: conditional ones follow the predictor,
//    jumps are taken; a taken branch ends the bundle.
// The block is purely combinational.
//
// Resolving Branch_on_BQ at fetch from consecutive head entries, the use of
// the branch predictor for a pop whose push has not executed, the BQ-full
// stall of a push, and the one-cycle misfetch of a taken Branch_on_BQ that
// misses in the BTB follow the CFD fetch-unit description. This design's own
// choices: Push_BQ and Branch_on_BQ are recognised from predecode marks that
// the instruction cache delivers with the bundle, so the pops and pushes of a
// bundle are always counted exactly; a BTB entry whose kind disagrees with
// the predecode marks is ignored.
module fetch_select
  import cfd_pkg::*;
#(
  parameter int unsigned W     = FETCH_W,
  parameter int unsigned AW    = PC_W,
  parameter int unsigned SIZE  = BQ_SIZE,
  localparam int unsigned PTR_W  = $clog2(SIZE) + 1,
  localparam int unsigned CNT_W  = $clog2(W + 1),
  localparam int unsigned SLOT_W = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned OFF_W  = $clog2(W) + 2
) (
  input  logic [AW-1:0]     pc,
  input  logic [W-1:0]      pd_push,      // predecode: slot holds Push_BQ
  input  logic [W-1:0]      pd_bqbr,      // predecode: slot holds Branch_on_BQ
  input  logic [W-1:0]      btb_hit,
  input  br_type_t          btb_type   [W],
  input  logic [AW-1:0]     btb_target [W],
  input  logic [W-1:0]      bp_dir,       // predictor direction per slot
  input  logic [W-1:0]      win_pushed,   // BQ head window
  input  logic [W-1:0]      win_pred,
  input  logic [PTR_W-1:0]  free_slots,   // BQ size minus BQ length
  output logic [W-1:0]      slot_valid,   // instructions delivered
  output logic [W-1:0]      slot_push,
  output logic [W-1:0]      slot_pop,
  output logic [W-1:0]      slot_spec,    // pop used a predicted predicate
  output logic [W-1:0]      slot_taken,   // branch (of any kind) taken
  output logic [CNT_W-1:0]  npush,
  output logic [CNT_W-1:0]  npop,
  output logic [W-1:0]      pop_pred,     // predicted predicate per pop lane
  output logic [AW-1:0]     next_pc,
  output logic              bq_stall,     // bundle cut at a push: BQ full
  output logic              misfetch,     // taken Branch_on_BQ missed the BTB
  output logic [SLOT_W-1:0] misfetch_slot
);

  logic [AW-1:0]     base;
  logic [SLOT_W-1:0] start;
  assign base  = {pc[AW-1:OFF_W], OFF_W'(0)};
  assign start = SLOT_W'(pc[OFF_W-1:2]);

  logic             done;
  logic             taken;
  logic [CNT_W-1:0] pu, po;
  logic [SLOT_W-1:0] lane;

  always_comb begin
    done          = 1'b0;
    taken         = 1'b0;
    lane          = '0;
    pu            = '0;
    po            = '0;
    slot_valid    = '0;
    slot_push     = '0;
    slot_pop      = '0;
    slot_spec     = '0;
    slot_taken    = '0;
    pop_pred      = '0;
    next_pc       = base + (AW'(W) << 2);
    bq_stall      = 1'b0;
    misfetch      = 1'b0;
    misfetch_slot = '0;
    for (int unsigned s = 0; s < W; s++) begin
      if (SLOT_W'(s) >= start && !done) begin
        if (pd_push[s] && PTR_W'(pu) >= free_slots) begin
          done     = 1'b1;
          bq_stall = 1'b1;
          next_pc  = base + (AW'(s) << 2);
        end else begin
          slot_valid[s] = 1'b1;
          if (pd_push[s]) begin
            slot_push[s] = 1'b1;
            pu = pu + 1'b1;
          end
          if (pd_bqbr[s]) begin
            lane           = po[SLOT_W-1:0];
            slot_pop[s]    = 1'b1;
            slot_spec[s]   = !win_pushed[lane];
            pop_pred[lane] = bp_dir[s];
            taken          = win_pushed[lane] ? win_pred[lane] : bp_dir[s];
            po           = po + 1'b1;
            if (taken) begin
              slot_taken[s] = 1'b1;
              done          = 1'b1;
              if (btb_hit[s] && btb_type[s] == BR_BQ) begin
                next_pc = btb_target[s];
              end else begin
                misfetch      = 1'b1;
                misfetch_slot = SLOT_W'(s);
                next_pc       = base + (AW'(s + 1) << 2);
              end
            end
          end else if (!pd_push[s] && btb_hit[s] && btb_type[s] != BR_BQ) begin
            if (btb_type[s] == BR_JUMP || bp_dir[s]) begin
              slot_taken[s] = 1'b1;
              done          = 1'b1;
              next_pc       = btb_target[s];
            end
          end
        end
      end
    end
    npush = pu;
    npop  = po;
  end

endmodule
