// btb_table: storage of the branch target buffer (BTB).
//
// A direct-mapped table of ENTRIES entries, each holding a valid bit, the
// upper PC bits as a tag, the branch target and a two-bit predictor state.
// It has one combinational lookup port and one write port:
//
//  * Lookup (lk_pc): hit when the entry indexed by the low PC bits is valid
//    and its tag matches; pred_taken is the upper predictor bit. The fetch
//    unit looks up the address it is fetching in the same cycle.
//  * Update (upd_en, upd_pc, upd_target, upd_taken): used once per resolved
//    branch, in the cycle the branch is in EXE and the CPU drives B, TK and
//    the target. If the branch has an entry, its predictor is stepped up on
//    TK and down otherwise. If it has none, an entry is created with the
//    target from the address bus and a predictor of "weakly taken", which
//    is then stepped by TK in the same cycle (creation comes before the
//    update in the algorithm followed here). alloc pulses on a creation.
//
// Creation on B, "weakly taken" as the initial state and the update on TK
// follow the algorithm; the direct-mapped organisation, full tags, ENTRIES=64
// and overwrite-on-conflict replacement are this design's choices, since no
// BTB size or organisation is given. A write is seen by the lookup port from
// the next cycle on. Reset clears all valid bits.
module btb_table
  import aim_pkg::*;
#(
  parameter int unsigned ENTRIES = 64
) (
  input  logic  clk,
  input  logic  rst_n,
  // lookup
  input  addr_t lk_pc,
  output logic  lk_hit,
  output logic  lk_pred_taken,
  output addr_t lk_target,
  // creation / predictor update
  input  logic  upd_en,
  input  addr_t upd_pc,
  input  addr_t upd_target,
  input  logic  upd_taken,
  output logic  alloc
);

  localparam int unsigned IDX_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int unsigned TAG_W = ADDR_W - IDX_W;

  typedef logic [IDX_W-1:0] idx_t;
  typedef logic [TAG_W-1:0] tag_t;

  logic [ENTRIES-1:0] valid_q;
  tag_t  tag_q    [ENTRIES];
  addr_t target_q [ENTRIES];
  ctr_t  ctr_q    [ENTRIES];

  // Lookup port
  idx_t lk_idx;
  assign lk_idx        = lk_pc[IDX_W-1:0];
  assign lk_hit        = valid_q[lk_idx] && (tag_q[lk_idx] == lk_pc[ADDR_W-1:IDX_W]);
  assign lk_target     = target_q[lk_idx];
  assign lk_pred_taken = lk_hit && ctr_q[lk_idx][1];

  // Update port
  idx_t upd_idx;
  logic upd_hit;
  ctr_t ctr_base, ctr_new;
  logic unused_pred;

  assign upd_idx  = upd_pc[IDX_W-1:0];
  assign upd_hit  = valid_q[upd_idx] && (tag_q[upd_idx] == upd_pc[ADDR_W-1:IDX_W]);
  assign ctr_base = upd_hit ? ctr_q[upd_idx] : CTR_WT;
  assign alloc    = upd_en && !upd_hit;

  sat_counter u_ctr (
    .cur        (ctr_base),
    .taken      (upd_taken),
    .nxt        (ctr_new),
    .pred_taken (unused_pred)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) valid_q <= '0;
    else if (alloc) valid_q[upd_idx] <= 1'b1;
  end

  always_ff @(posedge clk) begin
    if (upd_en) begin
      ctr_q[upd_idx] <= ctr_new;
      if (!upd_hit) begin
        tag_q[upd_idx]    <= upd_pc[ADDR_W-1:IDX_W];
        target_q[upd_idx] <= upd_target;
      end
    end
  end

endmodule
