// phast_trainer: turns a committing load into a PHAST update.
//
// Memory order violations are handled lazily: a load that was hit by a
// violation is squashed when it reaches commit, and only then is the
// predictor trained, so that the store it learns is the youngest conflicting
// one and the path is one that really executed. For such a load the trainer
// computes
//   history length L = (load branch count - store branch count) + 1,
//     i.e. the N divergent branches between store and load plus the branch
//     before the store; L is truncated to the longest table length not
//     above it (9..11 use the length-8 table, anything over 32 the
//     length-32 table);
//   store distance   = (SQ index of the youngest store older than the load
//                      - SQ index of the conflicting store) mod SQ_ENTRIES,
//     the number of stores between the two;
// and issues UPD_ALLOC. A load that committed without violation but with a
// prediction updates the providing entry's confidence: UPD_CONF_OK when the
// data was forwarded by the predicted store, UPD_CONF_FAIL otherwise.
//
// The lazy squash at commit, the history length N+1 with truncation, the
// SQ-index difference and the confidence rules follow the published design.
// What counts as "waited for the correct store" (forwarded from the
// predicted store), and that a violated load only allocates (it does not
// also decrement the entry that mispredicted it), are this implementation's
// choices.
//
// Timing: cm_valid in cycle t samples the commit-time history window and
// drives cm_squash combinationally; the command appears on up_* in cycle t+1
// for one cycle. Divergent branches older than the load must have been
// shifted into the commit history in an earlier cycle.
module phast_trainer
  import phast_pkg::*;
#(
  parameter int unsigned SQ_ENTRIES = 114,
  localparam int unsigned SQI_BITS  = $clog2(SQ_ENTRIES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // committing load
  input  logic                  cm_valid,
  input  logic [PC_BITS-1:0]    cm_pc,
  input  logic [BRCNT_BITS-1:0] cm_ld_brcnt,
  input  logic [SQI_BITS-1:0]   cm_ld_last_sq,
  input  logic                  cm_pred_hit,
  input  provider_t             cm_provider,
  input  logic [SQI_BITS-1:0]   cm_pred_sq,
  input  logic                  cm_fwd_valid,
  input  logic [SQI_BITS-1:0]   cm_fwd_sq,
  input  logic                  cm_violated,
  input  logic [BRCNT_BITS-1:0] cm_viol_brcnt,
  input  logic [SQI_BITS-1:0]   cm_viol_sq,
  input  hist_window_t          cm_window,
  output logic                  cm_squash,
  // command to the predictor
  output logic                  up_valid,
  output upd_op_t               up_op,
  output logic [PC_BITS-1:0]    up_pc,
  output hist_window_t          up_window,
  output logic [TBL_BITS-1:0]   up_table,
  output logic [DIST_BITS-1:0]  up_dist,
  output provider_t             up_provider,
  output logic [5:0]            up_hlen,      // L before truncation, capped at 63
  output logic                  up_truncated  // L was not a table length
);

  logic [BRCNT_BITS-1:0] n_br;
  logic [BRCNT_BITS:0]   len;
  logic [5:0]            len_cap;
  logic [TBL_BITS-1:0]   tsel;
  logic                  exact;
  logic [SQI_BITS:0]     dsum;
  logic [SQI_BITS-1:0]   sq_dist;

  always_comb begin
    n_br    = cm_ld_brcnt - cm_viol_brcnt;
    len     = {1'b0, n_br} + 1'b1;
    len_cap = (len > 63) ? 6'd63 : 6'(len);
    tsel    = '0;
    exact   = 1'b0;
    for (int t = 0; t < NUM_TABLES; t++)
      if (int'(len) >= int'(HIST_LEN[t])) begin
        tsel  = TBL_BITS'(t);
        exact = (int'(len) == int'(HIST_LEN[t]));
      end
    // modular SQ index difference
    if (cm_ld_last_sq >= cm_viol_sq)
      dsum = {1'b0, cm_ld_last_sq} - {1'b0, cm_viol_sq};
    else
      dsum = {1'b0, cm_ld_last_sq} + (SQI_BITS+1)'(SQ_ENTRIES) - {1'b0, cm_viol_sq};
    sq_dist = SQI_BITS'(dsum);
  end

  assign cm_squash = cm_valid && cm_violated;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      up_valid     <= 1'b0;
      up_op        <= UPD_ALLOC;
      up_pc        <= '0;
      up_window    <= '0;
      up_table     <= '0;
      up_dist      <= '0;
      up_provider  <= '0;
      up_hlen      <= '0;
      up_truncated <= 1'b0;
    end else begin
      up_valid <= cm_valid && (cm_violated || cm_pred_hit);
      if (cm_valid) begin
        up_pc        <= cm_pc;
        up_window    <= cm_window;
        up_table     <= tsel;
        up_dist      <= DIST_BITS'(sq_dist);
        up_provider  <= cm_provider;
        up_hlen      <= len_cap;
        up_truncated <= !exact;
        if (cm_violated)
          up_op <= UPD_ALLOC;
        else if (cm_fwd_valid && cm_fwd_sq == cm_pred_sq)
          up_op <= UPD_CONF_OK;
        else
          up_op <= UPD_CONF_FAIL;
      end
    end
  end

endmodule
