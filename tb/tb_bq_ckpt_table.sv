// tb_bq_ckpt_table: self-checking testbench of the BQ checkpoint snapshots.
//
// Random snapshots are written into random checkpoint slots while random
// roll-backs read them back; a shadow copy of every slot gives the expected
// head/tail. Exception roll-backs must return the committed pointers, and a
// snapshot read in the cycle it is written must be forwarded.
//
// Timing: writes take effect at the rising edge; the restore outputs are
// combinational and are compared in the same cycle. Default sizes (128-entry
// BQ, 8 checkpoints). Same-cycle forwarding is this design's own choice.
module tb_bq_ckpt_table;
  import cfd_pkg::*;
  localparam int unsigned SIZE  = 128;
  localparam int unsigned NCKPT = 8;
  localparam int unsigned PTR_W = $clog2(SIZE) + 1;
  localparam int unsigned ID_W  = $clog2(NCKPT);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             ck_valid, rec_exception;
  logic [ID_W-1:0]  ck_id, rec_id;
  logic [PTR_W-1:0] ck_head, ck_tail, arch_head, arch_tail, rec_head, rec_tail;

  bq_ckpt_table #(.SIZE(SIZE), .NCKPT(NCKPT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (t=%0t)", what, $time); end
  endtask

  logic [PTR_W-1:0] sh_head [NCKPT], sh_tail [NCKPT];
  int n_fwd = 0, n_exc = 0;

  initial begin
    ck_valid = 0; rec_exception = 0; ck_id = 0; rec_id = 0;
    ck_head = 0; ck_tail = 0; arch_head = 0; arch_tail = 0;
    for (int i = 0; i < NCKPT; i++) begin sh_head[i] = 0; sh_tail[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      ck_valid      = 1'($urandom);
      ck_id         = ID_W'($urandom);
      ck_head       = PTR_W'($urandom);
      ck_tail       = PTR_W'($urandom);
      arch_head     = PTR_W'($urandom);
      arch_tail     = PTR_W'($urandom);
      rec_exception = ($urandom_range(0, 3) == 0);
      rec_id        = ($urandom_range(0, 3) == 0) ? ck_id : ID_W'($urandom);
      #1;
      if (rec_exception) begin
        check(rec_head == arch_head && rec_tail == arch_tail, "exception restore");
        n_exc++;
      end else if (ck_valid && ck_id == rec_id) begin
        check(rec_head == ck_head && rec_tail == ck_tail, "forwarded snapshot");
        n_fwd++;
      end else begin
        check(rec_head == sh_head[rec_id] && rec_tail == sh_tail[rec_id], "stored snapshot");
      end
      if (ck_valid) begin sh_head[ck_id] = ck_head; sh_tail[ck_id] = ck_tail; end
    end
    check(n_fwd > 0 && n_exc > 0, "all read paths used");
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
