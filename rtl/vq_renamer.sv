// vq_renamer: the value-queue (VQ) renamer of the rename stage, used by the
// CFD+ extension to pass values from the predicate loop to the second loop.
//
// The architectural value queue lives in the physical register file. The
// renamer is a circular buffer whose entries hold physical register mappings,
// not values. A VQ push, which has been given a destination physical register
// from the free list, writes that mapping at the tail. A VQ pop reads the
// mapping at the head and uses it as its source register, so after renaming
// the pop waits on its push in the issue queue like any consumer on its
// producer. Freeing the register when the pop retires is left to the core.
//
// Up to W instructions are renamed per cycle, in lane order. A pop whose push
// is earlier in the same rename bundle receives the mapping forwarded from
// that lane. rn_pop_preg is a combinational read; the pointers and entries
// change at the rising clock edge.
//
// The mapping buffer with head and tail pointers and the push/pop behaviour
// follow the CFD+ description; its size (128 entries of 8 bits) follows the
// evaluated core. This design's own choices: pointers with a wrap bit,
// intra-bundle forwarding, and a restore port (rec_valid) that reloads head
// and tail from a checkpoint snapshot on a roll-back, in the same way as for
// the branch queue; the snapshot itself is kept by the core.
module vq_renamer
  import cfd_pkg::*;
#(
  parameter int unsigned SIZE   = VQ_SIZE,
  parameter int unsigned W      = FETCH_W,
  parameter int unsigned MAP_W  = PREG_W,
  localparam int unsigned IDX_W = $clog2(SIZE),
  localparam int unsigned PTR_W = IDX_W + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [W-1:0]     rn_push,                // lane renames a VQ push
  input  logic [MAP_W-1:0] rn_push_preg [W],       // its destination register
  input  logic [W-1:0]     rn_pop,                 // lane renames a VQ pop
  output logic [MAP_W-1:0] rn_pop_preg  [W],       // its source register
  output logic [PTR_W-1:0] head,
  output logic [PTR_W-1:0] tail,
  input  logic             rec_valid,
  input  logic [PTR_W-1:0] rec_head,
  input  logic [PTR_W-1:0] rec_tail
);

  logic [MAP_W-1:0] map_q [SIZE];
  logic [PTR_W-1:0] head_q, tail_q;
  logic [PTR_W-1:0] push_ptr [W];   // tail position of each lane's push
  logic [PTR_W-1:0] pop_ptr  [W];   // head position of each lane's pop
  logic [PTR_W-1:0] head_d, tail_d;

  assign head = head_q;
  assign tail = tail_q;

  logic [PTR_W-1:0] t, h;

  always_comb begin
    t = tail_q;
    h = head_q;
    for (int unsigned l = 0; l < W; l++) begin
      push_ptr[l] = t;
      pop_ptr[l]  = h;
      if (rn_push[l]) t = t + 1'b1;
      if (rn_pop[l])  h = h + 1'b1;
    end
    tail_d = t;
    head_d = h;
  end

  always_comb begin
    for (int unsigned l = 0; l < W; l++) begin
      rn_pop_preg[l] = map_q[pop_ptr[l][IDX_W-1:0]];
      for (int unsigned k = 0; k < l; k++) begin
        if (rn_push[k] && push_ptr[k] == pop_ptr[l]) rn_pop_preg[l] = rn_push_preg[k];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rec_valid) begin
      for (int unsigned l = 0; l < W; l++) begin
        if (rn_push[l]) map_q[push_ptr[l][IDX_W-1:0]] <= rn_push_preg[l];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head_q <= '0;
      tail_q <= '0;
    end else if (rec_valid) begin
      head_q <= rec_head;
      tail_q <= rec_tail;
    end else begin
      head_q <= head_d;
      tail_q <= tail_d;
    end
  end

  // ISA ordering rules: never more than SIZE values queued, never a pop
  // without its push.
  a_vq_bounds: assert property (@(posedge clk) disable iff (!rst_n || rec_valid)
    (tail_d - head_d) <= PTR_W'(SIZE));

endmodule
