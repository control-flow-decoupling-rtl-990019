// tb_btb: self-checking testbench of the branch target buffer.
//
// Directed: four branches in the four slots of one bundle are all reported in
// their own slots; filling a set with four bundles and installing a fifth
// evicts the first one (round-robin start) and keeps the others; refreshing
// an entry replaces its kind and target. Random: installs to a pool of
// addresses that collide in a few sets; every lookup hit must return the last
// data installed for that branch, branches never installed must never hit,
// and a branch just installed must hit.
//
// Timing: an update written at a rising edge is visible to lookups from the
// next cycle; lookups are combinational. Default geometry (4K entries,
// 4 ways, 4-wide bundles). Size and associativity follow the evaluated core;
// bundle organisation and round-robin replacement are this design's own.
module tb_btb;
  import cfd_pkg::*;
  localparam int unsigned ENTRIES = 4096;
  localparam int unsigned WAYS    = 4;
  localparam int unsigned W       = 4;
  localparam int unsigned AW      = 64;
  localparam int unsigned SETS    = ENTRIES / WAYS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [AW-1:0] lk_pc, up_pc, up_target;
  logic [W-1:0]  lk_hit;
  br_type_t      lk_type [W];
  logic [AW-1:0] lk_target [W];
  logic          up_valid;
  br_type_t      up_type;

  btb #(.ENTRIES(ENTRIES), .WAYS(WAYS), .W(W), .AW(AW)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  task automatic install(input logic [AW-1:0] pc, input br_type_t t, input logic [AW-1:0] tg);
    @(negedge clk);
    up_valid = 1; up_pc = pc; up_type = t; up_target = tg;
    @(negedge clk);
    up_valid = 0;
  endtask

  function automatic logic [AW-1:0] bundle(input int unsigned set, input int unsigned tag);
    return (AW'(tag) << (4 + $clog2(SETS))) | (AW'(set) << 4);
  endfunction

  // random-phase model: last data per branch address
  logic [AW-1:0] m_target [logic [AW-1:0]];
  br_type_t      m_type   [logic [AW-1:0]];
  int n_hit = 0, n_miss = 0;

  initial begin
    up_valid = 0; up_pc = 0; up_type = BR_COND; up_target = 0; lk_pc = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // four slots of one bundle
    for (int s = 0; s < 4; s++)
      install(bundle(5, 1) + AW'(4 * s), br_type_t'(s % 3), AW'(32'h1000 + 16 * s));
    lk_pc = bundle(5, 1) + 8; #1;
    check(lk_hit == 4'b1111, "four slots hit");
    for (int s = 0; s < 4; s++)
      check(lk_type[s] == br_type_t'(s % 3) && lk_target[s] == AW'(32'h1000 + 16 * s), "slot data");
    // set 9: four bundles, then a fifth
    for (int t = 0; t < 5; t++) install(bundle(9, t + 2) + 4, BR_BQ, AW'(32'h2000 + 4 * t));
    lk_pc = bundle(9, 2); #1; check(lk_hit == 4'b0000, "first bundle evicted");
    for (int t = 1; t < 5; t++) begin
      lk_pc = bundle(9, t + 2); #1;
      check(lk_hit == 4'b0010 && lk_type[1] == BR_BQ && lk_target[1] == AW'(32'h2000 + 4 * t), "others kept");
    end
    install(bundle(9, 4) + 4, BR_JUMP, 64'h3000);
    lk_pc = bundle(9, 4); #1;
    check(lk_hit[1] && lk_type[1] == BR_JUMP && lk_target[1] == 64'h3000, "entry refreshed");
    lk_pc = bundle(9, 7); #1; check(lk_hit == 4'b0000, "never installed misses");

    // random phase
    for (int i = 0; i < 3000; i++) begin
      logic [AW-1:0] pc, tg;
      br_type_t t;
      pc = bundle(100 + $urandom_range(0, 2), 20 + $urandom_range(0, 5)) + AW'(4 * $urandom_range(0, 3));
      tg = {$urandom, $urandom} & ~AW'(3);
      t  = br_type_t'($urandom_range(0, 2));
      install(pc, t, tg);
      m_target[pc] = tg; m_type[pc] = t;
      lk_pc = pc; #1;
      check(lk_hit[pc[3:2]] && lk_target[pc[3:2]] == tg && lk_type[pc[3:2]] == t, "just installed hits");
      // probe a random address of the pool
      lk_pc = bundle(100 + $urandom_range(0, 3), 20 + $urandom_range(0, 7));
      #1;
      for (int s = 0; s < 4; s++) begin
        logic [AW-1:0] a;
        a = lk_pc + AW'(4 * s);
        if (lk_hit[s]) begin
          n_hit++;
          check(m_target.exists(a) && lk_target[s] == m_target[a] && lk_type[s] == m_type[a], "hit data");
        end else n_miss++;
      end
    end
    $display("random probes: hit=%0d miss=%0d", n_hit, n_miss);
    check(n_hit > 0 && n_miss > 0, "hits and misses seen");
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
