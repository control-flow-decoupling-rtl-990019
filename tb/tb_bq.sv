// tb_bq: self-checking testbench of the branch queue.
//
// Directed part: early push (pop uses the pushed predicate), late push with a
// wrong and with a right speculative prediction (mispredict flag and
// checkpoint id), forwarding of a push executing in the cycle its pop is
// fetched, recovery clearing the popped bits between the restored pointers,
// and the committed pointers. Random part: a few thousand cycles of legal
// pushes, pops, push executions, renames and retirements against a reference
// model of the entry state; every head-window bit and every late-push result
// is compared.
//
// Timing: inputs are applied 1 time unit after a rising edge and outputs are
// compared just before the next one. SIZE is reduced to 16 so that wrap-around
// and a full queue occur often. The expected behaviour follows the BQ
// description (early/late push, speculative pop, roll-back); the reference
// model's encoding of pointers with a wrap bit follows this design's choice.
module tb_bq;
  import cfd_pkg::*;

  localparam int unsigned SIZE  = 16;
  localparam int unsigned W     = 4;
  localparam int unsigned IDX_W = $clog2(SIZE);
  localparam int unsigned PTR_W = IDX_W + 1;
  localparam int unsigned CNT_W = $clog2(W + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [CNT_W-1:0]  fe_npush, fe_npop, rt_npush, rt_npop;
  logic [W-1:0]      fe_pop_pred, win_pushed, win_pred;
  logic [PTR_W-1:0]  head, tail, arch_head, arch_tail, rec_head, rec_tail;
  logic              rn_valid, ex_valid, ex_pred, ex_late, ex_mispredict, rec_valid;
  logic [IDX_W-1:0]  rn_idx, ex_idx;
  logic [CKPT_W-1:0] rn_ckpt, ex_mp_ckpt;

  bq #(.SIZE(SIZE), .W(W)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // Reference model.
  logic              m_pred [SIZE], m_pushed [SIZE], m_popped [SIZE];
  logic [CKPT_W-1:0] m_ckpt [SIZE];
  logic [PTR_W-1:0]  m_head, m_tail, m_ahead, m_atail;

  task automatic idle();
    fe_npush = '0; fe_npop = '0; fe_pop_pred = '0;
    rn_valid = 1'b0; rn_idx = '0; rn_ckpt = '0;
    ex_valid = 1'b0; ex_idx = '0; ex_pred = 1'b0;
    rt_npush = '0; rt_npop = '0;
    rec_valid = 1'b0; rec_head = '0; rec_tail = '0;
  endtask

  // Compare the outputs against the model for the inputs now applied.
  task automatic compare_outputs();
    for (int k = 0; k < W; k++) begin
      int unsigned i;
      logic ep, ev;
      i  = (int'(m_head) + k) % SIZE;
      ep = m_pushed[i];
      ev = m_pred[i];
      if (ex_valid && ex_idx == IDX_W'(i)) begin ep = 1'b1; ev = ex_pred; end
      check(win_pushed[k] == ep, $sformatf("win_pushed[%0d]", k));
      if (ep) check(win_pred[k] == ev, $sformatf("win_pred[%0d]", k));
    end
    if (ex_valid) begin
      check(ex_late == m_popped[ex_idx], "ex_late");
      check(ex_mispredict == (m_popped[ex_idx] && m_pred[ex_idx] != ex_pred), "ex_mispredict");
      if (ex_mispredict)
        check(ex_mp_ckpt == ((rn_valid && rn_idx == ex_idx) ? rn_ckpt : m_ckpt[ex_idx]), "ex_mp_ckpt");
    end
    check(head == m_head && tail == m_tail, "head/tail");
    check(arch_head == m_ahead && arch_tail == m_atail, "arch pointers");
  endtask

  // Apply the inputs to the model (what the clock edge should do).
  task automatic model_step();
    logic wp [W];
    for (int k = 0; k < W; k++) begin
      int unsigned i;
      i = (int'(m_head) + k) % SIZE;
      wp[k] = m_pushed[i] || (ex_valid && ex_idx == IDX_W'(i));
    end
    if (!rec_valid)
      for (int k = 0; k < int'(fe_npush); k++) begin
        int unsigned i;
        i = (int'(m_tail) + k) % SIZE;
        m_pushed[i] = 1'b0; m_popped[i] = 1'b0;
      end
    if (ex_valid) begin m_pred[ex_idx] = ex_pred; m_pushed[ex_idx] = 1'b1; end
    if (!rec_valid)
      for (int k = 0; k < int'(fe_npop); k++) begin
        int unsigned i;
        i = (int'(m_head) + k) % SIZE;
        if (!wp[k]) begin m_pred[i] = fe_pop_pred[k]; m_popped[i] = 1'b1; end
      end
    if (rn_valid) m_ckpt[rn_idx] = rn_ckpt;
    if (rec_valid) begin
      for (int unsigned n = 0; n < PTR_W'(rec_tail - rec_head); n++)
        m_popped[(int'(rec_head) + n) % SIZE] = 1'b0;
      m_head = rec_head; m_tail = rec_tail;
    end else begin
      m_head = m_head + PTR_W'(fe_npop);
      m_tail = m_tail + PTR_W'(fe_npush);
    end
    m_ahead = m_ahead + PTR_W'(rt_npop);
    m_atail = m_atail + PTR_W'(rt_npush);
  endtask

  task automatic step();
    #1 compare_outputs();
    model_step();
    @(posedge clk);
    #1 idle();
  endtask

  int n_late = 0, n_mis = 0, n_byp = 0, n_rec = 0, n_spec = 0;

  initial begin
    idle();
    for (int i = 0; i < SIZE; i++) begin
      m_pred[i] = 0; m_pushed[i] = 0; m_popped[i] = 0; m_ckpt[i] = 0;
    end
    m_head = 0; m_tail = 0; m_ahead = 0; m_atail = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // Directed: three pushes fetched, two execute early.
    fe_npush = 3; step();
    check(tail == 3, "tail after 3 pushes");
    ex_valid = 1; ex_idx = 0; ex_pred = 1; step();
    ex_valid = 1; ex_idx = 1; ex_pred = 0; step();
    #1 check(win_pushed[2:0] == 3'b011 && win_pred[1:0] == 2'b01, "early pushes visible");
    // Three pops: entries 0 and 1 non-speculative, entry 2 speculative (predict 1).
    fe_npop = 3; fe_pop_pred = 4'b0100; step();
    check(head == 3, "head after 3 pops");
    rn_valid = 1; rn_idx = 2; rn_ckpt = 5; step();
    // Late push with the opposite predicate: mispredict, checkpoint 5.
    ex_valid = 1; ex_idx = 2; ex_pred = 0;
    #1 check(ex_late && ex_mispredict && ex_mp_ckpt == 5, "late push mispredict");
    step();
    // Forwarding: push 3 fetched, then executes in the cycle its pop is fetched.
    fe_npush = 1; step();
    ex_valid = 1; ex_idx = 3; ex_pred = 1; fe_npop = 1; fe_pop_pred = 0;
    #1 check(win_pushed[0] && win_pred[0] && !ex_late, "push forwarded to pop");
    step();
    // Late push with a right prediction: late but no mispredict.
    fe_npush = 1; step();
    fe_npop = 1; fe_pop_pred = 4'b0001; step();
    ex_valid = 1; ex_idx = 4; ex_pred = 1;
    #1 check(ex_late && !ex_mispredict, "late push, right prediction");
    step();
    // Recovery: entries 5,6 pushed, 5 popped speculatively, roll back to
    // head=5, tail=7: popped bit of 5 must be cleared.
    fe_npush = 2; step();
    fe_npop = 1; fe_pop_pred = 1; step();
    rec_valid = 1; rec_head = 5; rec_tail = 7; step();
    check(head == 5 && tail == 7, "pointers restored");
    ex_valid = 1; ex_idx = 5; ex_pred = 0;
    #1 check(!ex_late, "popped bit cleared by recovery");
    step();
    rt_npush = 4; rt_npop = 4; step();
    rt_npush = 1; rt_npop = 1; step();
    check(arch_head == 5 && arch_tail == 5, "committed pointers");

    // Random phase against the model.
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int unsigned inflight, unpopped, room, unret_pops, unret_push;
      inflight   = PTR_W'(m_tail - m_ahead);
      unpopped   = PTR_W'(m_tail - m_head);
      unret_pops = PTR_W'(m_head - m_ahead);
      if (PTR_W'(m_atail - m_ahead) < unret_pops) unret_pops = PTR_W'(m_atail - m_ahead);
      unret_push = PTR_W'(m_tail - m_atail);
      room       = SIZE - inflight;
      if ($urandom_range(0, 60) == 0 && unret_pops + unpopped > 0) begin
        // roll back to a point between the committed and current pointers
        int unsigned keep_pop, keep_push;
        keep_pop  = $urandom_range(0, unret_pops);
        rec_valid = 1;
        rec_head  = m_ahead + PTR_W'(keep_pop);
        keep_push = $urandom_range(0, PTR_W'(m_tail - rec_head));
        rec_tail  = rec_head + PTR_W'(keep_push);
        if (PTR_W'(rec_tail - m_ahead) < PTR_W'(m_atail - m_ahead)) rec_tail = m_atail;
        n_rec++;
      end else begin
        fe_npush = CNT_W'($urandom_range(0, (room < W) ? room : W));
        fe_npop  = CNT_W'($urandom_range(0, (unpopped < W) ? unpopped : W));
        fe_pop_pred = W'($urandom);
      end
      if (inflight > 0 && $urandom_range(0, 1) != 0) begin
        ex_valid = 1;
        ex_idx   = IDX_W'(int'(m_ahead) + $urandom_range(0, inflight - 1));
        ex_pred  = 1'($urandom);
      end
      if (inflight > 0 && $urandom_range(0, 2) == 0) begin
        rn_valid = 1;
        rn_idx   = IDX_W'(int'(m_ahead) + $urandom_range(0, inflight - 1));
        rn_ckpt  = CKPT_W'($urandom);
      end
      if (!rec_valid) begin
        rt_npop  = CNT_W'($urandom_range(0, (unret_pops < W) ? unret_pops : W));
        rt_npush = CNT_W'($urandom_range(0, (unret_push < W) ? unret_push : W));
      end
      #1;
      if (ex_valid && ex_late) n_late++;
      if (ex_valid && ex_mispredict) n_mis++;
      for (int k = 0; k < int'(fe_npop); k++) if (!win_pushed[k]) n_spec++;
      for (int k = 0; k < W; k++)
        if (ex_valid && ex_idx == IDX_W'(int'(m_head) + k) && !m_pushed[ex_idx]) n_byp++;
      step();
    end
    $display("random: late=%0d mispredict=%0d speculative=%0d forwarded=%0d recoveries=%0d",
             n_late, n_mis, n_spec, n_byp, n_rec);
    check(n_late > 0 && n_mis > 0 && n_spec > 0 && n_byp > 0 && n_rec > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
