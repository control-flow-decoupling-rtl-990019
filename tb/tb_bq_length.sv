// tb_bq_length: self-checking testbench of the BQ length counters.
//
// Random fetches, retirements and roll-backs of pushes and pops are applied
// within the ISA rules (never more than SIZE pushes unmatched by retired
// pops). A reference model keeps the retired push/pop totals and the list of
// in-flight pushes; net_push_ctr, pending_push_ctr, length, free_slots and
// full are compared every cycle. The queue is driven to full so the stall
// condition (full) is reached.
//
// Timing: inputs change after a rising edge, counters are compared before the
// next one. Default sizes (128 entries, 4-wide). The counter rules follow the
// BQ length description; counting a roll-back cycle's retiring pushes is this
// design's own choice.
module tb_bq_length;
  localparam int unsigned SIZE  = 128;
  localparam int unsigned W     = 4;
  localparam int unsigned PTR_W = $clog2(SIZE) + 1;
  localparam int unsigned CNT_W = $clog2(W + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [CNT_W-1:0] fe_npush, rt_npush, rt_npop;
  logic             rec_valid, full;
  logic [PTR_W-1:0] tail_before, rec_tail, net_push_ctr, pending_push_ctr, length, free_slots;

  bq_length #(.SIZE(SIZE), .W(W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // model: pushes fetched so far (tail), pushes retired, pops retired
  int m_tail = 0, m_rpush = 0, m_rpop = 0, m_fpop = 0;
  int n_full = 0, n_rec = 0;

  initial begin
    fe_npush = 0; rt_npush = 0; rt_npop = 0; rec_valid = 0; tail_before = 0; rec_tail = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int room, pend, phase;
      @(negedge clk);
      // expected state
      check(int'(net_push_ctr) == m_rpush - m_rpop, "net_push_ctr");
      check(int'(pending_push_ctr) == m_tail - m_rpush, "pending_push_ctr");
      check(int'(length) == m_tail - m_rpop, "length");
      check(int'(free_slots) == SIZE - (m_tail - m_rpop), "free_slots");
      check(full == (m_tail - m_rpop == SIZE), "full");
      if (full) n_full++;
      // phase 0: fill (few retirements); phase 1: drain
      phase = (cyc / 500) % 2;
      room  = SIZE - (m_tail - m_rpop);
      pend  = m_tail - m_rpush;
      fe_npush = 0; rt_npush = 0; rt_npop = 0; rec_valid = 0;
      tail_before = PTR_W'(m_tail); rec_tail = PTR_W'(m_tail);
      if ($urandom_range(0, 80) == 0 && pend > 0) begin
        int keep;
        keep = $urandom_range(0, pend);
        rec_valid = 1;
        rec_tail  = PTR_W'(m_rpush + keep);
        m_tail    = m_rpush + keep;
        n_rec++;
      end else begin
        int np;
        np = $urandom_range(0, (room < W) ? room : W);
        fe_npush = CNT_W'(np);
        m_tail += np;
        if (phase == 1 || $urandom_range(0, 5) == 0) begin
          int rp, ro;
          rp = $urandom_range(0, (pend < W) ? pend : W);
          ro = $urandom_range(0, ((m_rpush - m_rpop) < W) ? (m_rpush - m_rpop) : W);
          rt_npush = CNT_W'(rp);
          rt_npop  = CNT_W'(ro);
          m_rpush += rp;
          m_rpop  += ro;
        end
      end
    end
    $display("full cycles=%0d roll-backs=%0d", n_full, n_rec);
    check(n_full > 0, "queue reached full");
    check(n_rec > 0, "roll-back seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
