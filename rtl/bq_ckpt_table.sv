// bq_ckpt_table: BQ state saved with each branch checkpoint, and the choice
// of restore point on a roll-back.
//
// Each of the NCKPT branch checkpoints of the core is extended with a
// snapshot of the BQ head and tail pointers. When a checkpoint is taken
// (ck_valid) the snapshot carried by the checkpointing instruction is written
// into slot ck_id. On a roll-back the BQ pointers come either from the
// referenced checkpoint (misprediction) or from the committed pointers
// arch_head/arch_tail (exception); the selected pair is driven on
// rec_head/rec_tail in the same cycle (combinational read).
//
// What is saved and the two restore sources follow the CFD recovery
// description. The register-file organisation, write at the rising edge, and
// the forwarding of a snapshot written in the same cycle as it is read are
// this design's choices.
module bq_ckpt_table
  import cfd_pkg::*;
#(
  parameter int unsigned SIZE  = BQ_SIZE,
  parameter int unsigned NCKPT = NUM_CKPT,
  localparam int unsigned PTR_W = $clog2(SIZE) + 1,
  localparam int unsigned ID_W  = (NCKPT > 1) ? $clog2(NCKPT) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // take a checkpoint
  input  logic             ck_valid,
  input  logic [ID_W-1:0]  ck_id,
  input  logic [PTR_W-1:0] ck_head,
  input  logic [PTR_W-1:0] ck_tail,
  // roll back
  input  logic             rec_exception, // 1: committed pointers, 0: checkpoint
  input  logic [ID_W-1:0]  rec_id,
  input  logic [PTR_W-1:0] arch_head,
  input  logic [PTR_W-1:0] arch_tail,
  output logic [PTR_W-1:0] rec_head,
  output logic [PTR_W-1:0] rec_tail
);

  logic [PTR_W-1:0] head_q [NCKPT];
  logic [PTR_W-1:0] tail_q [NCKPT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < NCKPT; i++) begin
        head_q[i] <= '0;
        tail_q[i] <= '0;
      end
    end else if (ck_valid) begin
      head_q[ck_id] <= ck_head;
      tail_q[ck_id] <= ck_tail;
    end
  end

  always_comb begin
    if (rec_exception) begin
      rec_head = arch_head;
      rec_tail = arch_tail;
    end else if (ck_valid && ck_id == rec_id) begin
      rec_head = ck_head;
      rec_tail = ck_tail;
    end else begin
      rec_head = head_q[rec_id];
      rec_tail = tail_q[rec_id];
    end
  end

endmodule
