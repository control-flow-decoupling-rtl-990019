// tb_fetch_select: self-checking testbench of the fetch-bundle selection.
//
// Directed cases: early-pushed Branch_on_BQ taken with a BTB hit (redirect),
// the same with a BTB miss (misfetch, bundle cut after it), a speculative pop
// using the predictor direction, a push stalled by a full BQ (bundle cut just
// before the push), and a bundle entered at a middle slot. Random cases are
// compared with a reference written as a slot-by-slot walk over the rules.
//
// The block is combinational: inputs are applied and outputs compared after
// a 1 time unit delay; a free-running clock counts the watchdog's cycles.
// Default sizes (4-wide, 128-entry BQ). The rules checked follow the fetch
// unit description; bundle alignment and predecode marks are this design's.
module tb_fetch_select;
  import cfd_pkg::*;
  localparam int unsigned W     = 4;
  localparam int unsigned AW    = 64;
  localparam int unsigned SIZE  = 128;
  localparam int unsigned PTR_W = $clog2(SIZE) + 1;
  localparam int unsigned CNT_W = $clog2(W + 1);

  logic [AW-1:0]    pc, next_pc;
  logic [W-1:0]     pd_push, pd_bqbr, btb_hit, bp_dir, win_pushed, win_pred;
  br_type_t         btb_type [W];
  logic [AW-1:0]    btb_target [W];
  logic [PTR_W-1:0] free_slots;
  logic [W-1:0]     slot_valid, slot_push, slot_pop, slot_spec, slot_taken, pop_pred;
  logic [CNT_W-1:0] npush, npop;
  logic             bq_stall, misfetch;
  logic [1:0]       misfetch_slot;

  fetch_select #(.W(W), .AW(AW), .SIZE(SIZE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic clear();
    pc = 64'h1000; pd_push = 0; pd_bqbr = 0; btb_hit = 0; bp_dir = 0;
    win_pushed = 0; win_pred = 0; free_slots = PTR_W'(SIZE);
    for (int s = 0; s < W; s++) begin btb_type[s] = BR_COND; btb_target[s] = 64'h8000 + 64'(s * 64); end
  endtask

  // Reference walk.
  task automatic compare(input string name);
    logic [W-1:0] e_valid = 0, e_push = 0, e_pop = 0, e_spec = 0, e_taken = 0, e_pp = 0;
    int pu = 0, po = 0, s;
    logic [AW-1:0] e_next;
    logic e_stall = 0, e_mf = 0;
    int e_mfs = 0;
    logic [AW-1:0] base;
    base   = pc & ~AW'(15);
    e_next = base + 16;
    s = int'(pc[3:2]);
    while (s < W) begin
      if (pd_push[s] && pu >= int'(free_slots)) begin
        e_stall = 1; e_next = base + AW'(4 * s); break;
      end
      e_valid[s] = 1;
      if (pd_push[s]) begin e_push[s] = 1; pu++; end
      if (pd_bqbr[s]) begin
        logic t;
        e_pop[s]  = 1;
        e_spec[s] = !win_pushed[po];
        e_pp[po]  = bp_dir[s];
        t = win_pushed[po] ? win_pred[po] : bp_dir[s];
        po++;
        if (t) begin
          e_taken[s] = 1;
          if (btb_hit[s] && btb_type[s] == BR_BQ) e_next = btb_target[s];
          else begin e_mf = 1; e_mfs = s; e_next = base + ((AW'(s) + 1) << 2); end
          break;
        end
      end else if (!pd_push[s] && btb_hit[s] && btb_type[s] != BR_BQ &&
                   (btb_type[s] == BR_JUMP || bp_dir[s])) begin
        e_taken[s] = 1; e_next = btb_target[s]; break;
      end
      s++;
    end
    #1;
    check(slot_valid == e_valid && slot_push == e_push && slot_pop == e_pop, {name, ": slots"});
    check(slot_spec == e_spec && slot_taken == e_taken, {name, ": spec/taken"});
    check(int'(npush) == pu && int'(npop) == po && pop_pred == e_pp, {name, ": counts"});
    check(next_pc == e_next, {name, ": next_pc"});
    check(bq_stall == e_stall && misfetch == e_mf && (!e_mf || int'(misfetch_slot) == e_mfs), {name, ": stall/misfetch"});
  endtask

  int n_stall = 0, n_mf = 0, n_spec = 0, n_bqtaken = 0;

  initial begin
    // early push, taken, BTB hit at slot 1
    clear(); pd_bqbr = 4'b0010; win_pushed = 4'b0001; win_pred = 4'b0001;
    btb_hit = 4'b0010; btb_type[1] = BR_BQ; btb_target[1] = 64'h4000;
    #1 check(next_pc == 64'h4000 && slot_valid == 4'b0011 && npop == 1 && !misfetch, "BQ taken, BTB hit");
    compare("d1");
    // same, BTB miss -> misfetch
    btb_hit = 0;
    #1 check(misfetch && misfetch_slot == 1 && next_pc == 64'h1008 && slot_valid == 4'b0011, "BQ taken, BTB miss");
    compare("d2");
    // speculative pop uses predictor: not taken
    clear(); pd_bqbr = 4'b0101; win_pushed = 4'b0001; win_pred = 4'b0000; bp_dir = 4'b0000;
    #1 check(slot_spec == 4'b0100 && npop == 2 && slot_valid == 4'b1111 && next_pc == 64'h1010, "speculative pop");
    compare("d3");
    // full BQ: push at slot 2 with one free slot and a push at slot 0
    clear(); pd_push = 4'b0101; free_slots = 1;
    #1 check(bq_stall && slot_valid == 4'b0011 && npush == 1 && next_pc == 64'h1008, "push stalled");
    compare("d4");
    // enter at slot 3
    clear(); pc = 64'h100c; pd_bqbr = 4'b1001; win_pushed = 4'b0001; win_pred = 4'b0000;
    #1 check(slot_valid == 4'b1000 && npop == 1 && slot_spec == 4'b0000, "mid-bundle entry");
    compare("d5");

    for (int i = 0; i < 20000; i++) begin
      pc         = 64'h1000 + 64'(4 * $urandom_range(0, 3));
      pd_push    = W'($urandom);
      pd_bqbr    = W'($urandom) & ~pd_push;
      btb_hit    = W'($urandom);
      bp_dir     = W'($urandom);
      win_pushed = W'($urandom);
      win_pred   = W'($urandom);
      free_slots = PTR_W'($urandom_range(0, 4));
      for (int s = 0; s < W; s++) begin
        btb_type[s]   = br_type_t'($urandom_range(0, 2));
        btb_target[s] = {$urandom, $urandom} & ~AW'(3);
      end
      compare("random");
      if (bq_stall) n_stall++;
      if (misfetch) n_mf++;
      if (slot_spec != 0) n_spec++;
      if ((slot_taken & slot_pop) != 0 && !misfetch) n_bqtaken++;
    end
    $display("random: stalls=%0d misfetches=%0d speculative=%0d bq_taken_hit=%0d", n_stall, n_mf, n_spec, n_bqtaken);
    check(n_stall > 0 && n_mf > 0 && n_spec > 0 && n_bqtaken > 0, "all cases seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // clock used only to count watchdog cycles
  logic wd_clk = 1'b0;
  always #5 wd_clk = ~wd_clk;

  initial begin
    repeat (100000) @(posedge wd_clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
