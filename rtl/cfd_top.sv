// cfd_top: the control-flow decoupling (CFD) front end: a fetch unit that
// resolves Branch_on_BQ instructions in the fetch stage from a branch queue,
// plus the value-queue renamer of the CFD+ extension.
//
// Each cycle the fetch unit sends the bundle address fe_pc to the instruction
// cache, which returns predecode marks for Push_BQ and Branch_on_BQ in the
// same cycle. In parallel it looks up the BTB (btb) and reads the W entries at
// the BQ head (bq). fetch_select combines these with the branch predictor's
// directions (bp_dir, from the core's predictor) into the delivered slots,
// the next fetch address and the number of pushes and pops; bq_length holds
// the BQ length and limits pushes to the free entries (the BQ-full stall).
// Every delivered push and pop gets its BQ index (fe_slot_bq_idx), and every
// slot the BQ head and tail as they stand after it (fe_slot_head/tail), which
// the core carries to rename for checkpointing.
//
// A taken Branch_on_BQ that misses in the BTB ends the bundle; in the next
// cycle nothing is fetched, the decoder supplies the branch target
// (dec_bq_target), the branch is installed in the BTB and fetch resumes
// there: one cycle of misfetch penalty.
//
// The core drives the rest: rename records a speculative pop's checkpoint id
// in its BQ entry (rn_bq_*) and checkpoints the BQ pointers (ck_*); an
// executing push writes its predicate (ex_*) and reports a late push whose
// pop was mispredicted (ex_mispredict, ex_mp_ckpt); retirement advances the
// committed pointers and the length counters (rt_*); a roll-back (rec_*)
// restores the BQ from a checkpoint or from the committed pointers and
// redirects fetch to rec_pc. BTB updates from branch resolution enter on bu_*.
// The VQ renamer ports (vq_*) are those of the rename stage.
//
// Blocks and their interplay follow the CFD hardware description; the
// interface split between this front end and the core, the predecode marks
// and the bubble-then-redirect handling of a misfetch are this design's own.
// All state changes at the rising edge of clk; rst_n is an asynchronous,
// active-low reset.
module cfd_top
  import cfd_pkg::*;
#(
  parameter int unsigned BQ_N     = BQ_SIZE,
  parameter int unsigned VQ_N     = VQ_SIZE,
  parameter int unsigned W        = FETCH_W,
  parameter int unsigned AW       = PC_W,
  parameter int unsigned BTB_N    = BTB_ENTRIES,
  parameter int unsigned BTB_WAYS_P = BTB_WAYS,
  parameter logic [PC_W-1:0] RESET_PC = '0,
  localparam int unsigned IDX_W   = $clog2(BQ_N),
  localparam int unsigned PTR_W   = IDX_W + 1,
  localparam int unsigned CNT_W   = $clog2(W + 1),
  localparam int unsigned SLOT_W  = (W > 1) ? $clog2(W) : 1,
  localparam int unsigned OFF_W   = $clog2(W) + 2,
  localparam int unsigned VPTR_W  = $clog2(VQ_N) + 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch / instruction cache
  output logic              fe_valid,        // a bundle is fetched this cycle
  output logic [AW-1:0]     fe_pc,
  input  logic [W-1:0]      ic_pd_push,
  input  logic [W-1:0]      ic_pd_bqbr,
  input  logic [W-1:0]      bp_dir,
  output logic [W-1:0]      fe_slot_valid,
  output logic [W-1:0]      fe_slot_push,
  output logic [W-1:0]      fe_slot_pop,
  output logic [W-1:0]      fe_slot_spec,
  output logic [W-1:0]      fe_slot_taken,
  output logic [IDX_W-1:0]  fe_slot_bq_idx [W],
  output logic [PTR_W-1:0]  fe_slot_head   [W],
  output logic [PTR_W-1:0]  fe_slot_tail   [W],
  output logic              fe_bq_stall,
  output logic              fe_misfetch,
  // decode
  input  logic [AW-1:0]     dec_bq_target,
  // rename
  input  logic              rn_bq_valid,
  input  logic [IDX_W-1:0]  rn_bq_idx,
  input  logic [CKPT_W-1:0] rn_bq_ckpt,
  input  logic              ck_valid,
  input  logic [CKPT_W-1:0] ck_id,
  input  logic [PTR_W-1:0]  ck_head,
  input  logic [PTR_W-1:0]  ck_tail,
  // execute
  input  logic              ex_valid,
  input  logic [IDX_W-1:0]  ex_idx,
  input  logic              ex_pred,
  output logic              ex_late,
  output logic              ex_mispredict,
  output logic [CKPT_W-1:0] ex_mp_ckpt,
  // retire
  input  logic [CNT_W-1:0]  rt_npush,
  input  logic [CNT_W-1:0]  rt_npop,
  // roll-back
  input  logic              rec_valid,
  input  logic              rec_exception,
  input  logic [CKPT_W-1:0] rec_id,
  input  logic [AW-1:0]     rec_pc,
  // BTB update from branch resolution
  input  logic              bu_valid,
  input  logic [AW-1:0]     bu_pc,
  input  br_type_t          bu_type,
  input  logic [AW-1:0]     bu_target,
  // BQ status
  output logic [PTR_W-1:0]  bq_len,
  output logic [PTR_W-1:0]  bq_net_push_ctr,
  output logic [PTR_W-1:0]  bq_pending_push_ctr,
  output logic [PTR_W-1:0]  bq_head,
  output logic [PTR_W-1:0]  bq_tail,
  output logic [PTR_W-1:0]  bq_arch_head,
  output logic [PTR_W-1:0]  bq_arch_tail,
  // VQ renamer (CFD+)
  input  logic [W-1:0]      vq_push,
  input  logic [PREG_W-1:0] vq_push_preg [W],
  input  logic [W-1:0]      vq_pop,
  output logic [PREG_W-1:0] vq_pop_preg  [W],
  output logic [VPTR_W-1:0] vq_head,
  output logic [VPTR_W-1:0] vq_tail,
  input  logic              vq_rec_valid,
  input  logic [VPTR_W-1:0] vq_rec_head,
  input  logic [VPTR_W-1:0] vq_rec_tail
);

  // ---------------------------------------------------------------- state
  logic [AW-1:0] pc_q;
  logic          mf_q;       // decode cycle of a misfetched Branch_on_BQ
  logic [AW-1:0] mf_pc_q;    // its address

  assign fe_pc    = pc_q;
  assign fe_valid = !rec_valid && !mf_q;

  // ---------------------------------------------------------------- BTB
  logic [W-1:0]  btb_hit;
  br_type_t      btb_type   [W];
  logic [AW-1:0] btb_target [W];
  logic          up_valid;
  logic [AW-1:0] up_pc, up_target;
  br_type_t      up_type;

  always_comb begin
    if (mf_q && !rec_valid) begin
      up_valid  = 1'b1;
      up_pc     = mf_pc_q;
      up_type   = BR_BQ;
      up_target = dec_bq_target;
    end else begin
      up_valid  = bu_valid;
      up_pc     = bu_pc;
      up_type   = bu_type;
      up_target = bu_target;
    end
  end

  btb #(.ENTRIES(BTB_N), .WAYS(BTB_WAYS_P), .W(W), .AW(AW)) u_btb (
    .clk, .rst_n,
    .lk_pc(pc_q), .lk_hit(btb_hit), .lk_type(btb_type), .lk_target(btb_target),
    .up_valid, .up_pc, .up_type, .up_target
  );

  // ---------------------------------------------------------------- BQ
  logic [W-1:0]      win_pushed, win_pred, pop_pred;
  logic [PTR_W-1:0]  head, tail, arch_head, arch_tail, rec_head, rec_tail;
  logic [PTR_W-1:0]  free_slots;
  logic [CNT_W-1:0]  sel_npush, sel_npop, fe_npush, fe_npop;
  logic [AW-1:0]     next_pc;
  logic              sel_stall, sel_misfetch, bq_full;
  logic [SLOT_W-1:0] mf_slot;

  assign fe_npush = fe_valid ? sel_npush : '0;
  assign fe_npop  = fe_valid ? sel_npop  : '0;

  bq #(.SIZE(BQ_N), .W(W)) u_bq (
    .clk, .rst_n,
    .fe_npush, .fe_npop, .fe_pop_pred(pop_pred),
    .win_pushed, .win_pred, .head, .tail,
    .rn_valid(rn_bq_valid), .rn_idx(rn_bq_idx), .rn_ckpt(rn_bq_ckpt),
    .ex_valid, .ex_idx, .ex_pred, .ex_late, .ex_mispredict, .ex_mp_ckpt,
    .rt_npush, .rt_npop, .arch_head, .arch_tail,
    .rec_valid, .rec_head, .rec_tail
  );

  bq_ckpt_table #(.SIZE(BQ_N), .NCKPT(NUM_CKPT)) u_ckpt (
    .clk, .rst_n,
    .ck_valid, .ck_id, .ck_head, .ck_tail,
    .rec_exception, .rec_id, .arch_head, .arch_tail, .rec_head, .rec_tail
  );

  bq_length #(.SIZE(BQ_N), .W(W)) u_len (
    .clk, .rst_n,
    .fe_npush, .rt_npush, .rt_npop,
    .rec_valid, .tail_before(tail), .rec_tail,
    .net_push_ctr(bq_net_push_ctr), .pending_push_ctr(bq_pending_push_ctr), .length(bq_len),
    .free_slots, .full(bq_full)
  );

  fetch_select #(.W(W), .AW(AW), .SIZE(BQ_N)) u_sel (
    .pc(pc_q), .pd_push(ic_pd_push), .pd_bqbr(ic_pd_bqbr),
    .btb_hit, .btb_type, .btb_target, .bp_dir,
    .win_pushed, .win_pred, .free_slots,
    .slot_valid(fe_slot_valid), .slot_push(fe_slot_push), .slot_pop(fe_slot_pop),
    .slot_spec(fe_slot_spec), .slot_taken(fe_slot_taken),
    .npush(sel_npush), .npop(sel_npop), .pop_pred,
    .next_pc, .bq_stall(sel_stall), .misfetch(sel_misfetch), .misfetch_slot(mf_slot)
  );

  assign fe_bq_stall  = fe_valid && sel_stall;
  assign fe_misfetch  = fe_valid && sel_misfetch;
  assign bq_head      = head;
  assign bq_tail      = tail;
  assign bq_arch_head = arch_head;
  assign bq_arch_tail = arch_tail;

  // BQ index of each push and pop, and the pointers after each slot.
  logic [PTR_W-1:0] h, t;

  always_comb begin
    h = head;
    t = tail;
    for (int unsigned s = 0; s < W; s++) begin
      fe_slot_bq_idx[s] = '0;
      if (fe_slot_push[s]) begin
        fe_slot_bq_idx[s] = t[IDX_W-1:0];
        t = t + 1'b1;
      end
      if (fe_slot_pop[s]) begin
        fe_slot_bq_idx[s] = h[IDX_W-1:0];
        h = h + 1'b1;
      end
      fe_slot_head[s] = h;
      fe_slot_tail[s] = t;
    end
  end

  // ---------------------------------------------------------------- PC
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q    <= RESET_PC[AW-1:0];
      mf_q    <= 1'b0;
      mf_pc_q <= '0;
    end else if (rec_valid) begin
      pc_q <= rec_pc;
      mf_q <= 1'b0;
    end else if (mf_q) begin
      pc_q <= dec_bq_target;
      mf_q <= 1'b0;
    end else begin
      pc_q <= next_pc;
      if (sel_misfetch) begin
        mf_q    <= 1'b1;
        mf_pc_q <= {pc_q[AW-1:OFF_W], mf_slot, 2'b00};
      end
    end
  end

  // The BQ length register always equals the span from the committed head
  // to the speculative tail.
  a_len_matches_ptrs: assert property (@(posedge clk) disable iff (!rst_n)
    bq_len == PTR_W'(tail - arch_head));
  a_full_no_push: assert property (@(posedge clk) disable iff (!rst_n)
    bq_full |-> fe_npush == '0);

  // ---------------------------------------------------------------- VQ
  vq_renamer #(.SIZE(VQ_N), .W(W), .MAP_W(PREG_W)) u_vq (
    .clk, .rst_n,
    .rn_push(vq_push), .rn_push_preg(vq_push_preg),
    .rn_pop(vq_pop), .rn_pop_preg(vq_pop_preg),
    .head(vq_head), .tail(vq_tail),
    .rec_valid(vq_rec_valid), .rec_head(vq_rec_head), .rec_tail(vq_rec_tail)
  );

endmodule
