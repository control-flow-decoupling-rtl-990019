// bq: the branch queue (BQ) of the control-flow decoupling fetch unit.
//
// A Push_BQ instruction of the first (predicate) loop and the matching
// Branch_on_BQ instruction of the second loop meet in one BQ entry. The queue
// is a circular buffer of SIZE entries with a speculative head and tail used
// by fetch, and committed copies (arch_head, arch_tail) advanced at retirement.
//
//  * Fetch, push: each Push_BQ in the bundle is allocated the next entry at the
//    tail; its pushed and popped bits are cleared. The push keeps the index.
//  * Fetch, pop: each Branch_on_BQ takes the next entry at the head. The W
//    entries at the head are always visible on win_pushed/win_pred so a whole
//    bundle's pops are served in the cycle of the fetch. If the entry's pushed
//    bit is set the pop uses the pushed predicate (early push). Otherwise the
//    pop is speculative: fetch supplies a predicted predicate on fe_pop_pred,
//    which is recorded in the entry together with a set popped bit.
//  * Rename: a speculative pop records the id of the checkpoint taken for it.
//  * Execute, push: the push reads its entry. If the popped bit is set the push
//    is late; a predicted predicate that differs from the real one raises
//    ex_mispredict with the recorded checkpoint id. In all cases the push then
//    writes the predicate and sets the pushed bit.
//  * Recovery: head and tail are loaded from rec_head/rec_tail (a checkpoint
//    snapshot or the committed pointers, chosen outside) and the popped bits of
//    all entries from the restored head up to the restored tail are cleared.
//
// The entry state, the early/late push protocol and the recovery rule follow
// the CFD hardware description. This design's own choices: pointers carry one
// wrap bit above the index so that a full queue differs from an empty one;
// SIZE must be a power of two; one push executes per cycle; the predicted
// predicate and popped bit are written when the pop is fetched and the
// checkpoint id when it is renamed (the split shown in the BQ operation
// diagram); a push executing in the same cycle as the fetch of its pop is
// forwarded to the pop, and a checkpoint id written in the same cycle as the
// late push reads it is forwarded to the push. All updates take effect at the
// next rising clock edge; outputs are combinational reads of the registers.
module bq
  import cfd_pkg::*;
#(
  parameter int unsigned SIZE  = BQ_SIZE,
  parameter int unsigned W     = FETCH_W,
  localparam int unsigned IDX_W = $clog2(SIZE),
  localparam int unsigned PTR_W = IDX_W + 1,
  localparam int unsigned CNT_W = $clog2(W + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // fetch
  input  logic [CNT_W-1:0]  fe_npush,     // pushes in the fetched bundle
  input  logic [CNT_W-1:0]  fe_npop,      // pops in the fetched bundle
  input  logic [W-1:0]      fe_pop_pred,  // predicted predicate per pop lane
  output logic [W-1:0]      win_pushed,   // pushed bit of entries head..head+W-1
  output logic [W-1:0]      win_pred,     // predicate of entries head..head+W-1
  output logic [PTR_W-1:0]  head,
  output logic [PTR_W-1:0]  tail,
  // rename: checkpoint id of a speculative pop
  input  logic              rn_valid,
  input  logic [IDX_W-1:0]  rn_idx,
  input  logic [CKPT_W-1:0] rn_ckpt,
  // execute: a push writes its predicate
  input  logic              ex_valid,
  input  logic [IDX_W-1:0]  ex_idx,
  input  logic              ex_pred,
  output logic              ex_late,       // the push found its pop already fetched
  output logic              ex_mispredict, // ... and the pop's prediction was wrong
  output logic [CKPT_W-1:0] ex_mp_ckpt,    // checkpoint to roll back to
  // retire
  input  logic [CNT_W-1:0]  rt_npush,
  input  logic [CNT_W-1:0]  rt_npop,
  output logic [PTR_W-1:0]  arch_head,
  output logic [PTR_W-1:0]  arch_tail,
  // recovery
  input  logic              rec_valid,
  input  logic [PTR_W-1:0]  rec_head,
  input  logic [PTR_W-1:0]  rec_tail
);

  bq_entry_t        mem_q [SIZE];
  bq_entry_t        mem_d [SIZE];
  logic [PTR_W-1:0] head_q, tail_q, ahead_q, atail_q;

  assign head      = head_q;
  assign tail      = tail_q;
  assign arch_head = ahead_q;
  assign arch_tail = atail_q;

  // Head window with forwarding from a push executing in this cycle.
  logic [IDX_W-1:0] widx;

  always_comb begin
    widx = '0;
    for (int unsigned k = 0; k < W; k++) begin
      widx = head_q[IDX_W-1:0] + IDX_W'(k);
      win_pushed[k] = mem_q[widx].pushed;
      win_pred[k]   = mem_q[widx].pred;
      if (ex_valid && ex_idx == widx) begin
        win_pushed[k] = 1'b1;
        win_pred[k]   = ex_pred;
      end
    end
  end

  // Late-push check.
  always_comb begin
    ex_late       = ex_valid && mem_q[ex_idx].popped;
    ex_mispredict = ex_late && (mem_q[ex_idx].pred != ex_pred);
    ex_mp_ckpt    = (rn_valid && rn_idx == ex_idx) ? rn_ckpt : mem_q[ex_idx].ckpt;
  end

  // Next state of the entries.
  logic [PTR_W-1:0] rec_cnt;
  assign rec_cnt = rec_tail - rec_head;

  logic [IDX_W-1:0] nidx, off;

  always_comb begin
    nidx = '0;
    off  = '0;
    for (int unsigned e = 0; e < SIZE; e++) mem_d[e] = mem_q[e];
    if (!rec_valid) begin
      for (int unsigned k = 0; k < W; k++) begin
        nidx = tail_q[IDX_W-1:0] + IDX_W'(k);
        if (k < fe_npush) begin
          mem_d[nidx].pushed = 1'b0;
          mem_d[nidx].popped = 1'b0;
        end
      end
    end
    if (ex_valid) begin
      mem_d[ex_idx].pred   = ex_pred;
      mem_d[ex_idx].pushed = 1'b1;
    end
    if (!rec_valid) begin
      for (int unsigned k = 0; k < W; k++) begin
        nidx = head_q[IDX_W-1:0] + IDX_W'(k);
        if (k < fe_npop && !win_pushed[k]) begin
          mem_d[nidx].pred   = fe_pop_pred[k];
          mem_d[nidx].popped = 1'b1;
        end
      end
    end
    if (rn_valid) mem_d[rn_idx].ckpt = rn_ckpt;
    if (rec_valid) begin
      for (int unsigned e = 0; e < SIZE; e++) begin
        off = IDX_W'(e) - rec_head[IDX_W-1:0];
        if (PTR_W'(off) < rec_cnt) mem_d[e].popped = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q  <= '0;
      tail_q  <= '0;
      ahead_q <= '0;
      atail_q <= '0;
      for (int unsigned e = 0; e < SIZE; e++) mem_q[e] <= '0;
    end else begin
      for (int unsigned e = 0; e < SIZE; e++) mem_q[e] <= mem_d[e];
      if (rec_valid) begin
        head_q <= rec_head;
        tail_q <= rec_tail;
      end else begin
        head_q <= head_q + PTR_W'(fe_npop);
        tail_q <= tail_q + PTR_W'(fe_npush);
      end
      ahead_q <= ahead_q + PTR_W'(rt_npop);
      atail_q <= atail_q + PTR_W'(rt_npush);
    end
  end

  // The ISA ordering rules keep the queue within its size.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (tail_q - ahead_q) <= PTR_W'(SIZE));

endmodule
