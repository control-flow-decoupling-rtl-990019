// tb_vq_renamer: self-checking testbench of the value-queue renamer.
//
// Each cycle up to four lanes rename VQ pushes (with random destination
// registers) and VQ pops, in random order within the bundle, keeping to the
// ISA rules (a pop always has an earlier push, at most SIZE values queued).
// A reference FIFO of mappings gives the register each pop must receive,
// including pops whose push is in the same bundle. Snapshots of head/tail are
// taken now and then and restored later, after which the pops must again
// receive the mappings queued at the snapshot.
//
// Timing: renames are applied after a falling edge and the combinational
// mappings compared before the next rising edge, where the pointers move. For
// 24 of every 64 cycles the queue is drained so same-bundle forwarding is
// exercised often. Default sizes (128 entries of 8 bits, 4 lanes). The
// push/pop mapping rule follows the CFD+ description; forwarding and the
// restore port are this design's own.
module tb_vq_renamer;
  import cfd_pkg::*;
  localparam int unsigned SIZE  = 128;
  localparam int unsigned W     = 4;
  localparam int unsigned MAP_W = 8;
  localparam int unsigned PTR_W = $clog2(SIZE) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [W-1:0]     rn_push, rn_pop;
  logic [MAP_W-1:0] rn_push_preg [W], rn_pop_preg [W];
  logic [PTR_W-1:0] head, tail, rec_head, rec_tail;
  logic             rec_valid;

  vq_renamer #(.SIZE(SIZE), .W(W), .MAP_W(MAP_W)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  // model: every value ever pushed, by sequence number; head/tail are sequence numbers
  logic [MAP_W-1:0] m_val [int];
  int m_head = 0, m_tail = 0, s_head = -1, s_tail = -1;
  int n_same = 0, n_rec = 0;

  initial begin
    rn_push = 0; rn_pop = 0; rec_valid = 0; rec_head = 0; rec_tail = 0;
    for (int l = 0; l < W; l++) rn_push_preg[l] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int t, h;
      int exp_pop [W];
      logic same [W];
      @(negedge clk);
      rn_push = 0; rn_pop = 0; rec_valid = 0;
      check(int'(head) == (m_head % (2 * SIZE)) && int'(tail) == (m_tail % (2 * SIZE)), "pointers");
      if (s_head >= 0 && $urandom_range(0, 100) == 0 && (m_tail - s_head) <= SIZE) begin
        rec_valid = 1;
        rec_head  = PTR_W'(s_head % (2 * SIZE));
        rec_tail  = PTR_W'(s_tail % (2 * SIZE));
        m_head = s_head; m_tail = s_tail;
        s_head = -1;
        n_rec++;
        continue;
      end
      if (s_head < 0 && $urandom_range(0, 20) == 0) begin s_head = m_head; s_tail = m_tail; end
      t = m_tail; h = m_head;
      for (int l = 0; l < W; l++) begin
        int lim;
        lim = (s_head >= 0 && s_head < h) ? s_head : h;   // keep snapshot entries alive
        same[l] = 0;
        // the queue is drained for 24 of every 64 cycles, so that pops
        // often meet their push in the same bundle
        if ((h == t || (cyc % 64) >= 24) && $urandom_range(0, 1) != 0 && (t + 1 - lim) <= SIZE) begin
          rn_push[l] = 1;
          rn_push_preg[l] = MAP_W'($urandom);
          m_val[t] = rn_push_preg[l];
          t++;
        end else if (h < t && $urandom_range(0, 3) != 0) begin
          rn_pop[l] = 1;
          exp_pop[l] = h;
          same[l] = (h >= m_tail);
          h++;
        end
      end
      #1;
      for (int l = 0; l < W; l++)
        if (rn_pop[l]) begin
          check(rn_pop_preg[l] == m_val[exp_pop[l]], "pop mapping");
          if (same[l]) n_same++;
        end
      m_tail = t; m_head = h;
    end
    $display("same-bundle pops=%0d restores=%0d", n_same, n_rec);
    check(n_same > 20 && n_rec > 0, "forwarding and restore seen");
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
