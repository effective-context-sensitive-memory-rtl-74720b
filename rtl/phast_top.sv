// phast_top: the PHAST memory dependence prediction subsystem.
//
// PHAST (path-aware store distance) predicts, for every load, the single
// older store it depends on, as a store distance, using as context only the
// divergent-branch path from that store to the load. This top connects the
// pieces an out-of-order core needs around it:
//   branch_history       decode-side divergent-branch counter and history
//   phast_predictor      8 tagged tables searched at decode (2-cycle lookup)
//   dep_propagate        distance -> SQ index to wait on, at LQ allocation
//   lq_violation_tracker per-load forwarding/violation record, filtered
//                        store searches
//   commit_history       commit-side history used for training
//   phast_trainer        at load commit: lazy squash, allocation or
//                        confidence update
// The core itself (queues, scheduler, caches, branch predictor) is outside;
// its side of each connection is a port here. The core carries a load's
// prediction (pr_*) to LQ allocation (la_*) and to commit (cm_*).
//
// Timing: a lookup at cycle t answers at t+2; a committing load is squashed
// in the same cycle (cm_squash) and its update reaches the tables at the end
// of cycle t+1. Divergent branches must reach commit_history (cb_*) in an
// earlier cycle than the loads that follow them commit.
module phast_top
  import phast_pkg::*;
#(
  parameter int unsigned SETS       = 2 ** SET_BITS,
  parameter int unsigned LQ_ENTRIES = 192,
  parameter int unsigned SQ_ENTRIES = 114,
  parameter int unsigned ST_PORTS   = 2,
  parameter int unsigned ADDR_BITS  = 61,
  localparam int unsigned LQI_BITS  = $clog2(LQ_ENTRIES),
  localparam int unsigned SQI_BITS  = $clog2(SQ_ENTRIES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // ---- decode: divergent branches and recovery ----
  input  logic                  br_valid,
  input  hist_entry_t           br_entry,
  input  logic                  rec_valid,
  input  logic                  rec_write,
  input  logic [BRCNT_BITS-1:0] rec_count,
  input  hist_entry_t           rec_entry,
  output logic [BRCNT_BITS-1:0] br_count,
  // ---- decode: load prediction ----
  input  logic                  lk_valid,
  input  logic [PC_BITS-1:0]    lk_pc,
  input  logic [LQI_BITS-1:0]   lk_id,
  output logic                  pr_valid,
  output logic [LQI_BITS-1:0]   pr_id,
  output logic                  pr_hit,
  output logic [DIST_BITS-1:0]  pr_dist,
  output provider_t             pr_provider,
  // ---- LQ allocation: dependence to the scheduler ----
  input  logic                  la_pred_hit,
  input  logic [DIST_BITS-1:0]  la_pred_dist,
  input  logic [SQI_BITS-1:0]   la_sq_last_idx,
  input  logic [SQI_BITS:0]     la_sq_count,
  output logic                  la_wait_valid,
  output logic [SQI_BITS-1:0]   la_wait_sq_idx,
  // ---- load queue events ----
  input  logic                  al_valid,
  input  logic [LQI_BITS-1:0]   al_idx,
  input  logic [SEQ_BITS-1:0]   al_seq,
  input  logic                  ex_valid,
  input  logic [LQI_BITS-1:0]   ex_idx,
  input  logic [ADDR_BITS-1:0]  ex_addr,
  input  logic [7:0]            ex_mask,
  input  logic                  ex_fwd_valid,
  input  logic [SEQ_BITS-1:0]   ex_fwd_seq,
  input  logic [SQI_BITS-1:0]   ex_fwd_sq,
  input  logic                  st_valid [ST_PORTS],
  input  logic [SEQ_BITS-1:0]   st_seq   [ST_PORTS],
  input  logic [ADDR_BITS-1:0]  st_addr  [ST_PORTS],
  input  logic [7:0]            st_mask  [ST_PORTS],
  input  logic [BRCNT_BITS-1:0] st_brcnt [ST_PORTS],
  input  logic [SQI_BITS-1:0]   st_sq    [ST_PORTS],
  input  logic                  fl_valid,
  input  logic [SEQ_BITS-1:0]   fl_seq,
  output logic                  ev_violation,
  output logic                  ev_filtered,
  output logic                  ev_replaced,
  // ---- commit: branches and loads ----
  input  logic                  cb_valid,
  input  hist_entry_t           cb_entry,
  input  logic                  cm_valid,
  input  logic [LQI_BITS-1:0]   cm_idx,
  input  logic [PC_BITS-1:0]    cm_pc,
  input  logic [BRCNT_BITS-1:0] cm_ld_brcnt,
  input  logic [SQI_BITS-1:0]   cm_ld_last_sq,
  input  logic                  cm_pred_hit,
  input  provider_t             cm_provider,
  input  logic [SQI_BITS-1:0]   cm_pred_sq,
  output logic                  cm_squash,
  // ---- training report ----
  output logic                  up_valid,
  output upd_op_t               up_op,
  output logic [TBL_BITS-1:0]   up_table,
  output logic [DIST_BITS-1:0]  up_dist,
  output logic [5:0]            up_hlen,
  output logic                  up_truncated,
  output logic                  up_hit,
  output logic                  up_evict
);

  hist_window_t dec_window, cmt_window, up_window;
  logic [PC_BITS-1:0] up_pc;
  provider_t          up_provider;

  logic                  t_violated, t_fwd_valid;
  logic [BRCNT_BITS-1:0] t_viol_brcnt;
  logic [SQI_BITS-1:0]   t_viol_sq, t_fwd_sq;

  branch_history u_bhist (
    .clk, .rst_n, .br_valid, .br_entry, .rec_valid, .rec_write, .rec_count,
    .rec_entry, .br_count, .window(dec_window));

  phast_predictor #(.SETS(SETS), .ID_BITS(LQI_BITS)) u_pred (
    .clk, .rst_n,
    .lk_valid, .lk_pc, .lk_window(dec_window), .lk_id,
    .pr_valid, .pr_id, .pr_hit, .pr_dist, .pr_provider,
    .up_valid, .up_op, .up_pc, .up_window, .up_table, .up_dist, .up_provider,
    .up_hit, .up_evict);

  dep_propagate #(.SQ_ENTRIES(SQ_ENTRIES)) u_prop (
    .pred_hit(la_pred_hit), .pred_dist(la_pred_dist),
    .sq_last_idx(la_sq_last_idx), .sq_count(la_sq_count),
    .wait_valid(la_wait_valid), .wait_sq_idx(la_wait_sq_idx));

  lq_violation_tracker #(
    .LQ_ENTRIES(LQ_ENTRIES), .SQ_ENTRIES(SQ_ENTRIES),
    .ST_PORTS(ST_PORTS), .ADDR_BITS(ADDR_BITS)
  ) u_lqt (
    .clk, .rst_n,
    .al_valid, .al_idx, .al_seq,
    .ex_valid, .ex_idx, .ex_addr, .ex_mask, .ex_fwd_valid, .ex_fwd_seq, .ex_fwd_sq,
    .st_valid, .st_seq, .st_addr, .st_mask, .st_brcnt, .st_sq,
    .fl_valid, .fl_seq,
    .cm_valid, .cm_idx,
    .cm_violated(t_violated), .cm_viol_brcnt(t_viol_brcnt), .cm_viol_sq(t_viol_sq),
    .cm_fwd_valid(t_fwd_valid), .cm_fwd_sq(t_fwd_sq),
    .ev_violation, .ev_filtered, .ev_replaced);

  commit_history u_chist (
    .clk, .rst_n, .cb_valid, .cb_entry, .window(cmt_window));

  phast_trainer #(.SQ_ENTRIES(SQ_ENTRIES)) u_train (
    .clk, .rst_n,
    .cm_valid, .cm_pc, .cm_ld_brcnt, .cm_ld_last_sq,
    .cm_pred_hit, .cm_provider, .cm_pred_sq,
    .cm_fwd_valid(t_fwd_valid), .cm_fwd_sq(t_fwd_sq),
    .cm_violated(t_violated), .cm_viol_brcnt(t_viol_brcnt), .cm_viol_sq(t_viol_sq),
    .cm_window(cmt_window), .cm_squash,
    .up_valid, .up_op, .up_pc, .up_window, .up_table, .up_dist, .up_provider,
    .up_hlen, .up_truncated);

endmodule
