// bq_length: the architectural BQ length register and the fetch stall test.
//
// The BQ occupancy is kept as the sum of two counters:
//   net_push_ctr     retired pushes minus retired pops (0..SIZE);
//   pending_push_ctr pushes fetched but not yet retired.
// A fetched push adds one to pending_push_ctr; a retired push moves one from
// pending_push_ctr to net_push_ctr; a retired pop subtracts one from
// net_push_ctr. On a roll-back the pushes between the restored tail and the
// tail before recovery are squashed, so pending_push_ctr drops by
// (tail_before - rec_tail).
//
// Fetch must stall a push when the queue is full. The block exposes
// free_slots = SIZE - length; the fetch logic lets a push through only while
// the pushes already accepted in the bundle leave a free slot, so a bundle is
// cut just before the first push that would overflow (a stall of that push).
//
// Counter roles, update events and the stall rule follow the CFD hardware
// description. Counts per cycle (up to the fetch width W), counters updated
// at the rising clock edge and combinational outputs are this design's
// choices. Fetched pushes are ignored in a recovery cycle because the
// fetched bundle is squashed.
module bq_length
  import cfd_pkg::*;
#(
  parameter int unsigned SIZE  = BQ_SIZE,
  parameter int unsigned W     = FETCH_W,
  localparam int unsigned PTR_W = $clog2(SIZE) + 1,
  localparam int unsigned CNT_W = $clog2(W + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] fe_npush,    // pushes fetched this cycle
  input  logic [CNT_W-1:0] rt_npush,    // pushes retired this cycle
  input  logic [CNT_W-1:0] rt_npop,     // pops retired this cycle
  input  logic             rec_valid,   // roll-back this cycle
  input  logic [PTR_W-1:0] tail_before, // BQ tail before the roll-back
  input  logic [PTR_W-1:0] rec_tail,    // BQ tail after the roll-back
  output logic [PTR_W-1:0] net_push_ctr,
  output logic [PTR_W-1:0] pending_push_ctr,
  output logic [PTR_W-1:0] length,
  output logic [PTR_W-1:0] free_slots,
  output logic             full
);

  logic [PTR_W-1:0] net_q, pend_q, squashed;

  assign squashed         = tail_before - rec_tail;
  assign net_push_ctr     = net_q;
  assign pending_push_ctr = pend_q;
  assign length           = net_q + pend_q;
  assign free_slots       = PTR_W'(SIZE) - length;
  assign full             = (length == PTR_W'(SIZE));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      net_q  <= '0;
      pend_q <= '0;
    end else begin
      net_q <= net_q + PTR_W'(rt_npush) - PTR_W'(rt_npop);
      if (rec_valid) pend_q <= pend_q - PTR_W'(rt_npush) - squashed;
      else           pend_q <= pend_q + PTR_W'(fe_npush) - PTR_W'(rt_npush);
    end
  end

  a_len_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    length <= PTR_W'(SIZE));

endmodule
