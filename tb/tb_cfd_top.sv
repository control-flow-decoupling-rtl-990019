// tb_cfd_top: end-to-end testbench of the CFD front end at its default sizes
// (128-entry BQ, 4-wide fetch, 4K-entry BTB, 128-entry VQ renamer).
//
// The testbench plays the instruction cache, the branch predictor and an
// in-order-retiring core around cfd_top. The program is a strip-mined
// control-flow-decoupled loop unrolled into straight-line code: each chunk is
// CHUNK predicate computations (one filler instruction plus a Push_BQ each)
// followed by CHUNK Branch_on_BQ instructions, each guarding a region of
// REGION filler instructions that is skipped when the predicate is 1.
// Predicates are random.
//
// Core model: every fetched instruction enters a reorder list. A push
// executes FE2EX (10) cycles after fetch, or 150..250 cycles for a few pushes
// standing in for cache misses (450 for the first push of the second
// chunk, which fills the BQ), so some pops are fetched before their push
// (speculative pops, predicted by a random predictor). A speculative pop is
// renamed two cycles after fetch: it gets a checkpoint and its BQ snapshot.
// A late push that reports a mispredict is answered by a roll-back to the
// pop's checkpoint: younger instructions are dropped and fetch restarts on
// the pop's correct path. Instructions retire in order, up to four a cycle;
// a push once executed, a pop once its predicate is known. Once, an
// exception at a retiring filler instruction rolls everything back to the
// committed state.
//
// Checks: every retired instruction is the next one of the correct program
// path; every non-speculative pop is resolved at fetch with the pushed
// predicate; the checkpoint id of a mispredict is the pop's; the VQ renamer
// returns the mapping of each value's push. Mechanisms counted, each
// required at least once: BQ-full stall, early push (pop resolved at fetch),
// speculative pop, late push, late-push mispredict with roll-back, exception
// roll-back, BTB misfetch of a taken Branch_on_BQ, taken Branch_on_BQ with a
// BTB hit, and VQ values forwarded within a rename bundle. Fetch timing is
// checked too: after a misfetch the next cycle fetches nothing and the one
// after fetches at the branch target (one-cycle penalty); after a taken
// Branch_on_BQ that hits in the BTB the next cycle fetches at its target
// (no penalty). A cycle count is reported for the whole program.
//
// A stream of VQ pushes and pops runs on the VQ renamer ports alongside; for
// 16 of every 64 cycles only pops are issued unless the queue is empty, so
// that pops meet their push in the same rename bundle. Program layout,
// latencies and the random predictor are the testbench's own choices; the
// 10-cycle fetch-to-execute latency and all sizes are those of the evaluated
// core. No parameter of cfd_top is overridden.
module tb_cfd_top;
  import cfd_pkg::*;

  localparam int unsigned W      = FETCH_W;
  localparam int unsigned BQN    = BQ_SIZE;
  localparam int unsigned IDX_W  = $clog2(BQN);
  localparam int unsigned PTR_W  = IDX_W + 1;
  localparam int unsigned CNT_W  = $clog2(W + 1);
  localparam int unsigned VPTR_W = $clog2(VQ_SIZE) + 1;
  localparam int          CHUNK  = BQN;   // strip-mined trip count = BQ size
  localparam int          CHUNKS = 3;
  localparam int          REGION = 3;
  localparam int          FE2EX  = 10;    // fetch-to-execute latency
  localparam logic [63:0] BASE   = 64'h0;
  // The first push of the second chunk always misses in the cache: its pop is
  // fetched first and predicted wrongly, and retirement waits for it while
  // fetch fills the BQ with the third chunk's pushes.
  localparam int          SLOW_PUSH = 2 * CHUNK + CHUNK * (1 + REGION) + 1;
  localparam int          SLOW_POP  = SLOW_PUSH - 1 + 2 * CHUNK;

  typedef enum int {K_NOP, K_PUSH, K_BQBR} kind_e;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // DUT signals
  logic              fe_valid, fe_bq_stall, fe_misfetch;
  logic [63:0]       fe_pc, dec_bq_target, rec_pc, bu_pc, bu_target;
  logic [W-1:0]      ic_pd_push, ic_pd_bqbr, bp_dir;
  logic [W-1:0]      fe_slot_valid, fe_slot_push, fe_slot_pop, fe_slot_spec, fe_slot_taken;
  logic [IDX_W-1:0]  fe_slot_bq_idx [W];
  logic [PTR_W-1:0]  fe_slot_head [W], fe_slot_tail [W];
  logic              rn_bq_valid, ck_valid, ex_valid, ex_pred, ex_late, ex_mispredict;
  logic [IDX_W-1:0]  rn_bq_idx, ex_idx;
  logic [CKPT_W-1:0] rn_bq_ckpt, ck_id, ex_mp_ckpt, rec_id;
  logic [PTR_W-1:0]  ck_head, ck_tail;
  logic [CNT_W-1:0]  rt_npush, rt_npop;
  logic              rec_valid, rec_exception, bu_valid;
  br_type_t          bu_type;
  logic [PTR_W-1:0]  bq_len, bq_net_push_ctr, bq_pending_push_ctr, bq_head, bq_tail,
                     bq_arch_head, bq_arch_tail;
  logic [W-1:0]      vq_push, vq_pop;
  logic [PREG_W-1:0] vq_push_preg [W], vq_pop_preg [W];
  logic [VPTR_W-1:0] vq_head, vq_tail, vq_rec_head, vq_rec_tail;
  logic              vq_rec_valid;

  cfd_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------ program
  kind_e prog_kind [];
  logic  prog_val  [];   // push: predicate; Branch_on_BQ: predicate of its push
  int    prog_tgt  [];   // Branch_on_BQ: word index of the taken target
  int    prog_len;

  function automatic logic [63:0] addr(input int i);
    return BASE + 64'(4 * i);
  endfunction
  function automatic int word(input logic [63:0] a);
    return int'((a - BASE) >> 2);
  endfunction
  function automatic kind_e kind_at(input int i);
    return (i >= 0 && i < prog_len) ? prog_kind[i] : K_NOP;
  endfunction

  task automatic build_program();
    int n;
    logic p [CHUNK];
    prog_len  = CHUNKS * (2 * CHUNK + CHUNK * (1 + REGION)) + 8;
    prog_kind = new[prog_len];
    prog_val  = new[prog_len];
    prog_tgt  = new[prog_len];
    n = 0;
    for (int c = 0; c < CHUNKS; c++) begin
      for (int i = 0; i < CHUNK; i++) begin
        p[i] = 1'($urandom);
        prog_kind[n] = K_NOP;  prog_val[n] = 0; prog_tgt[n] = 0; n++;
        prog_kind[n] = K_PUSH; prog_val[n] = p[i]; prog_tgt[n] = 0; n++;
      end
      for (int i = 0; i < CHUNK; i++) begin
        prog_kind[n] = K_BQBR; prog_val[n] = p[i]; prog_tgt[n] = n + 1 + REGION; n++;
        for (int r = 0; r < REGION; r++) begin
          prog_kind[n] = K_NOP; prog_val[n] = 0; prog_tgt[n] = 0; n++;
        end
      end
    end
    while (n < prog_len) begin prog_kind[n] = K_NOP; prog_val[n] = 0; prog_tgt[n] = 0; n++; end
  endtask

  // ------------------------------------------------------------ core model
  typedef struct {
    int                w;        // word index
    kind_e             k;
    int                idx;      // BQ index
    logic              spec;
    logic              taken;    // outcome used at fetch
    int                ready;    // cycle the instruction is complete (push: executes)
    logic              executed;
    int                ckpt;     // -1: none
    logic              renamed;
    logic [PTR_W-1:0]  h_after, t_after;
    int                fcycle;
  } rob_t;

  rob_t rob [$];
  logic pushed_done [BQN];
  logic [NUM_CKPT-1:0] ckpt_busy;
  int cycle = 0;
  int exp_w = 0;
  logic mf_pend = 0;
  // fetch timing expectations for the current (t_*) and next (nx_*) cycle
  logic t_bubble = 0, t_redirect = 0, t_after_mf = 0, nx_bubble, nx_redirect, nx_after_mf;
  logic [63:0] t_pc = 0, nx_pc;
  int n_pen_checked = 0, n_hit_checked = 0;
  logic [63:0] mf_target;
  logic rec_pend = 0;
  int   rec_pop_w;           // word of the mispredicted pop
  int   rec_pop_idx;
  logic exception_done = 0;
  int   retired = 0;

  // mechanism counters
  int n_stall = 0, n_early = 0, n_spec = 0, n_late = 0, n_mis = 0, n_exc = 0;
  int n_misfetch = 0, n_bqhit = 0, n_fwd = 0, n_vq = 0, n_vqfwd = 0;

  function automatic int alloc_ckpt();
    for (int i = 0; i < NUM_CKPT; i++)
      if (!ckpt_busy[i]) begin ckpt_busy[i] = 1'b1; return i; end
    return -1;
  endfunction

  task automatic drive_idle();
    rn_bq_valid = 0; rn_bq_idx = 0; rn_bq_ckpt = 0;
    ck_valid = 0; ck_id = 0; ck_head = 0; ck_tail = 0;
    ex_valid = 0; ex_idx = 0; ex_pred = 0;
    rt_npush = 0; rt_npop = 0;
    rec_valid = 0; rec_exception = 0; rec_id = 0; rec_pc = 0;
    bu_valid = 0; bu_pc = 0; bu_type = BR_COND; bu_target = 0;
  endtask

  // Drop every instruction younger than position pos of the reorder list.
  task automatic squash_after(input int pos);
    while (rob.size() > pos + 1) begin
      rob_t e;
      e = rob.pop_back();
      if (e.ckpt >= 0) ckpt_busy[e.ckpt] = 1'b0;
    end
  endtask

  // VQ model
  logic [PREG_W-1:0] vq_val [int];
  int vq_h = 0, vq_t = 0;

  task automatic vq_cycle();
    int t, h;
    t = vq_t; h = vq_h;
    vq_push = 0; vq_pop = 0; vq_rec_valid = 0; vq_rec_head = 0; vq_rec_tail = 0;
    for (int l = 0; l < W; l++) begin
      vq_push_preg[l] = 0;
      // every 64 cycles the queue is drained for 16 cycles
      if ((h == t || ((cycle % 64) >= 16 && $urandom_range(0, 1) != 0)) && (t + 1 - h) <= VQ_SIZE) begin
        vq_push[l] = 1; vq_push_preg[l] = PREG_W'($urandom_range(0, NUM_PREG - 1));
        vq_val[t] = vq_push_preg[l]; t++;
      end else if (h < t && $urandom_range(0, 1) != 0) begin
        vq_pop[l] = 1;
        if (h >= vq_t) n_vqfwd++;
        h++;
      end
    end
  endtask

  task automatic vq_check();
    int h;
    h = vq_h;
    for (int l = 0; l < W; l++) begin
      if (vq_push[l]) vq_t++;
      if (vq_pop[l]) begin
        check(vq_pop_preg[l] == vq_val[h], "VQ pop mapping");
        n_vq++;
        h++;
      end
    end
    vq_h = h;
  endtask

  initial begin
    int cyc_start, cyc_end;
    build_program();
    for (int i = 0; i < BQN; i++) pushed_done[i] = 0;
    ckpt_busy = '0;
    drive_idle();
    ic_pd_push = 0; ic_pd_bqbr = 0; bp_dir = 0; dec_bq_target = 0;
    vq_push = 0; vq_pop = 0; vq_rec_valid = 0; vq_rec_head = 0; vq_rec_tail = 0;
    for (int l = 0; l < W; l++) vq_push_preg[l] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    cyc_start = cycle;

    while (exp_w < prog_len - 8) begin
      cycle++;
      drive_idle();
      vq_cycle();

      if (rec_pend) begin
        // roll back to the mispredicted pop's checkpoint
        int pos;
        pos = -1;
        foreach (rob[i]) if (rob[i].w == rec_pop_w && rob[i].k == K_BQBR && rob[i].idx == rec_pop_idx) begin
          pos = i; break;
        end
        rec_pend = 0;
        if (pos >= 0) begin
          logic actual;
          squash_after(pos);
          if (!rob[pos].renamed) begin
            int c;
            c = alloc_ckpt();
            rob[pos].ckpt = c; rob[pos].renamed = 1;
            ck_valid = 1; ck_id = CKPT_W'(c);
            ck_head = rob[pos].h_after; ck_tail = rob[pos].t_after;
          end
          actual = prog_val[rob[pos].w];
          rob[pos].taken = actual;
          rec_valid = 1; rec_exception = 0; rec_id = CKPT_W'(rob[pos].ckpt);
          rec_pc = actual ? addr(prog_tgt[rob[pos].w]) : addr(rob[pos].w + 1);
          n_mis++;
        end
        mf_pend = 0;
      end else if (!exception_done && retired > 3 * CHUNK && rob.size() > 0 &&
                   rob[0].k == K_NOP && rob[0].ready <= cycle) begin
        // exception at the oldest instruction: back to the committed state
        rec_valid = 1; rec_exception = 1; rec_pc = addr(rob[0].w);
        squash_after(-1);
        exception_done = 1;
        mf_pend = 0;
        n_exc++;
      end else begin
        // rename: oldest speculative pop not yet renamed
        foreach (rob[i]) if (rob[i].k == K_BQBR && rob[i].spec && !rob[i].renamed &&
                              rob[i].fcycle + 2 <= cycle) begin
          int c;
          c = alloc_ckpt();
          if (c >= 0) begin
            rob[i].ckpt = c; rob[i].renamed = 1;
            rn_bq_valid = 1; rn_bq_idx = IDX_W'(rob[i].idx); rn_bq_ckpt = CKPT_W'(c);
            ck_valid = 1; ck_id = CKPT_W'(c); ck_head = rob[i].h_after; ck_tail = rob[i].t_after;
          end
          break;
        end
        // execute: oldest ready push
        foreach (rob[i]) if (rob[i].k == K_PUSH && !rob[i].executed && rob[i].ready <= cycle) begin
          rob[i].executed = 1;
          ex_valid = 1; ex_idx = IDX_W'(rob[i].idx); ex_pred = prog_val[rob[i].w];
          break;
        end
        // retire up to W
        begin
          int np, no;
          np = 0; no = 0;
          for (int r = 0; r < W && rob.size() > 0; r++) begin
            logic done;
            case (rob[0].k)
              K_PUSH:  done = rob[0].executed && !(ex_valid && ex_idx == IDX_W'(rob[0].idx));
              K_BQBR:  done = rob[0].ready <= cycle && (!rob[0].spec || pushed_done[rob[0].idx]);
              default: done = rob[0].ready <= cycle;
            endcase
            if (!done) break;
            begin
              rob_t e;
              e = rob.pop_front();
              check(e.w == exp_w, $sformatf("retire order: got word %0d, expected %0d", e.w, exp_w));
              if (e.k == K_BQBR) begin
                check(e.taken == prog_val[e.w], "pop outcome at retire");
                exp_w = prog_val[e.w] ? prog_tgt[e.w] : e.w + 1;
                no++;
              end else begin
                exp_w = e.w + 1;
                if (e.k == K_PUSH) np++;
              end
              if (e.ckpt >= 0) ckpt_busy[e.ckpt] = 1'b0;
              retired++;
            end
          end
          rt_npush = CNT_W'(np); rt_npop = CNT_W'(no);
        end
      end

      // instruction cache and predictor
      for (int s = 0; s < W; s++) begin
        int wi;
        wi = word({fe_pc[63:4], 4'b0000}) + s;
        ic_pd_push[s] = (kind_at(wi) == K_PUSH);
        ic_pd_bqbr[s] = (kind_at(wi) == K_BQBR);
      end
      bp_dir = W'($urandom);
      // the first pop of the second chunk is always predicted wrongly
      for (int s = 0; s < W; s++)
        if (word({fe_pc[63:4], 4'b0000}) + s == SLOW_POP) bp_dir[s] = !prog_val[SLOW_POP];
      dec_bq_target = mf_target;

      #1;
      // late pushes
      if (ex_valid) begin
        if (ex_late) n_late++;
        for (int s = 0; s < W; s++)
          if (fe_valid && fe_slot_pop[s] && fe_slot_bq_idx[s] == ex_idx) n_fwd++;
        if (ex_mispredict) begin
          int found;
          found = 0;
          foreach (rob[i]) if (rob[i].k == K_BQBR && rob[i].idx == int'(ex_idx) && rob[i].spec) begin
            if (rob[i].renamed) check(ex_mp_ckpt == CKPT_W'(rob[i].ckpt), "mispredict checkpoint id");
            rec_pend = 1; rec_pop_w = rob[i].w; rec_pop_idx = rob[i].idx; found = 1;
            break;
          end
          check(found == 1, "mispredicted pop in flight");
        end
        pushed_done[ex_idx] = 1'b1;
      end
      // fetch timing: a misfetch costs exactly one fetch cycle, a BTB hit none
      nx_bubble = 0; nx_redirect = 0; nx_after_mf = 0; nx_pc = t_pc;
      if (!rec_valid) begin
        if (t_bubble) begin
          check(!fe_valid, "misfetch: no fetch in the cycle after");
          nx_redirect = 1;
          nx_after_mf = 1;
          n_pen_checked++;
        end
        if (t_redirect) begin
          check(fe_valid && fe_pc == t_pc, "fetch continues at the taken target");
          if (!t_after_mf) n_hit_checked++;
        end
      end
      // fetched bundle
      mf_pend = 0;
      if (fe_valid) begin
        if (fe_bq_stall) n_stall++;
        if (fe_misfetch) begin
          n_misfetch++;
          mf_pend = 1;
        end
        for (int s = 0; s < W; s++) if (fe_slot_valid[s]) begin
          rob_t e;
          int wi;
          wi = word({fe_pc[63:4], 4'b0000}) + s;
          e.w = wi; e.k = kind_at(wi); e.idx = int'(fe_slot_bq_idx[s]);
          e.spec = fe_slot_spec[s]; e.taken = fe_slot_taken[s];
          e.ready = cycle + FE2EX; e.executed = 0; e.ckpt = -1; e.renamed = 0;
          e.h_after = fe_slot_head[s]; e.t_after = fe_slot_tail[s]; e.fcycle = cycle;
          if (e.k == K_PUSH) begin
            if ($urandom_range(0, 99) < 3) e.ready = cycle + $urandom_range(150, 250);
            if (wi == SLOW_PUSH) e.ready = cycle + 450;
            pushed_done[e.idx] = 1'b0;
          end
          if (e.k == K_BQBR) begin
            if (e.spec) n_spec++;
            else begin
              n_early++;
              check(e.taken == prog_val[wi], "pop resolved at fetch with pushed predicate");
            end
            if (e.taken) begin
              nx_pc = addr(prog_tgt[wi]);
              if (fe_misfetch) begin mf_target = addr(prog_tgt[wi]); nx_bubble = 1; end
              else begin n_bqhit++; nx_redirect = 1; end
            end
          end
          rob.push_back(e);
        end
      end
      t_bubble = nx_bubble; t_redirect = nx_redirect; t_after_mf = nx_after_mf; t_pc = nx_pc;
      vq_check();
      if (cycle > 400000) break;
      @(negedge clk);
    end
    cyc_end = cycle;

    $display("program of %0d instructions retired in %0d cycles", prog_len - 8, cyc_end - cyc_start);
    $display("stalls=%0d early=%0d speculative=%0d late=%0d mispredict_rollbacks=%0d exception_rollbacks=%0d",
             n_stall, n_early, n_spec, n_late, n_mis, n_exc);
    $display("misfetches=%0d bq_taken_btb_hit=%0d push_forwarded=%0d vq_pops=%0d vq_same_bundle=%0d",
             n_misfetch, n_bqhit, n_fwd, n_vq, n_vqfwd);
    $display("misfetch penalties timed=%0d BTB-hit redirects timed=%0d", n_pen_checked, n_hit_checked);
    check(exp_w >= prog_len - 8, "program completed");
    check(n_stall > 0, "BQ-full stall happened");
    check(n_early > 0, "early push happened");
    check(n_spec > 0, "speculative pop happened");
    check(n_late > 0, "late push happened");
    check(n_mis > 0, "late-push mispredict roll-back happened");
    check(n_exc > 0, "exception roll-back happened");
    check(n_misfetch > 0, "BTB misfetch happened");
    check(n_pen_checked > 0 && n_hit_checked > 0, "misfetch penalty and BTB-hit redirect timed");
    check(n_bqhit > 0, "taken Branch_on_BQ with BTB hit happened");
    check(n_vqfwd > 0, "VQ same-bundle forwarding happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
