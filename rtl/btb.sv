// btb: branch target buffer of the fetch unit, set-associative, which caches
// Branch_on_BQ instructions like any other branch.
//
// The BTB is looked up with the address of the fetch bundle in the cycle the
// bundle is fetched. A bundle is W aligned 4-byte instructions; the BTB set is
// selected by the bundle address and each way holds one branch of a bundle:
// its slot in the bundle, its kind (conditional, jump or Branch_on_BQ) and
// its taken target. The lookup result is given per slot (hit, kind, target);
// the fetch logic combines it with the predictor direction or with the
// predicate popped from the BQ to select the sequential or taken target.
//
// Updates (up_valid) install or refresh one branch: a way already holding the
// same bundle tag and slot is overwritten, else an invalid way, else the way
// named by the set's round-robin pointer, which then advances. The update is
// written at the rising clock edge; the lookup is a combinational read.
//
// Size and associativity (4K entries, 4 ways) and the Branch_on_BQ kind
// follow the evaluated core; the bundle-based organisation, the full tag and
// the round-robin replacement are this design's choices.
module btb
  import cfd_pkg::*;
#(
  parameter int unsigned ENTRIES = BTB_ENTRIES,
  parameter int unsigned WAYS    = BTB_WAYS,
  parameter int unsigned W       = FETCH_W,
  parameter int unsigned AW      = PC_W,
  localparam int unsigned SETS   = ENTRIES / WAYS,
  localparam int unsigned SET_W  = $clog2(SETS),
  localparam int unsigned SLOT_W = $clog2(W),
  localparam int unsigned OFF_W  = SLOT_W + 2,          // byte offset in a bundle
  localparam int unsigned TAG_W  = AW - OFF_W - SET_W,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // lookup
  input  logic [AW-1:0]    lk_pc,            // any address inside the bundle
  output logic [W-1:0]     lk_hit,
  output br_type_t         lk_type   [W],
  output logic [AW-1:0]    lk_target [W],
  // update
  input  logic             up_valid,
  input  logic [AW-1:0]    up_pc,            // address of the branch
  input  br_type_t         up_type,
  input  logic [AW-1:0]    up_target
);

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [SLOT_W-1:0] slot;
    br_type_t          kind;
    logic [AW-3:0]     target;  // word address of the taken target
  } btb_entry_t;

  btb_entry_t       ent_q   [WAYS][SETS];
  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAY_W-1:0] rr_q    [SETS];

  // Lookup.
  logic [SET_W-1:0] lk_set;
  logic [TAG_W-1:0] lk_tag;
  assign lk_set = lk_pc[OFF_W +: SET_W];
  assign lk_tag = lk_pc[AW-1 -: TAG_W];

  always_comb begin
    for (int unsigned s = 0; s < W; s++) begin
      lk_hit[s]    = 1'b0;
      lk_type[s]   = BR_COND;
      lk_target[s] = '0;
    end
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      btb_entry_t e;
      e = ent_q[w][lk_set];
      if (valid_q[lk_set][w] && e.tag == lk_tag) begin
        lk_hit[e.slot]    = 1'b1;
        lk_type[e.slot]   = e.kind;
        lk_target[e.slot] = {e.target, 2'b00};
      end
    end
  end

  // Update.
  logic [SET_W-1:0]  up_set;
  logic [TAG_W-1:0]  up_tag;
  logic [SLOT_W-1:0] up_slot;
  logic [WAY_W-1:0]  up_way;
  logic              up_found;
  assign up_set  = up_pc[OFF_W +: SET_W];
  assign up_tag  = up_pc[AW-1 -: TAG_W];
  assign up_slot = up_pc[2 +: SLOT_W];

  always_comb begin
    up_found = 1'b0;
    up_way   = rr_q[up_set];
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      if (!valid_q[up_set][w]) up_way = WAY_W'(w);
    end
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      if (valid_q[up_set][w] && ent_q[w][up_set].tag == up_tag &&
          ent_q[w][up_set].slot == up_slot) begin
        up_way   = WAY_W'(w);
        up_found = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (up_valid) begin
      ent_q[up_way][up_set] <= '{tag: up_tag, slot: up_slot, kind: up_type,
                                 target: up_target[AW-1:2]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < SETS; i++) begin
        valid_q[i] <= '0;
        rr_q[i]    <= '0;
      end
    end else if (up_valid) begin
      valid_q[up_set][up_way] <= 1'b1;
      if (!up_found && &valid_q[up_set]) rr_q[up_set] <= rr_q[up_set] + 1'b1;
    end
  end

endmodule
