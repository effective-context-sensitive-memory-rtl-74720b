// lq_violation_tracker: the memory-dependence state PHAST adds to each
// load queue entry, and the filtered store-to-load violation search.
//
// When a store computes its address it searches the load queue for younger
// loads that have already executed and read an overlapping location. Two
// rules keep the predictor from learning dependences that do not exist:
//   * Forwarding filter. A load that received its data by forwarding
//     remembers the sequence number of the forwarding store. A store older
//     than that forwarder cannot have been the load's producer, so its match
//     is ignored (the load read the correct, younger value).
//   * Youngest violator. Violations are squashed lazily at commit, so a load
//     may be hit by several stores before it commits; only the youngest
//     conflicting store is recorded, since that is the one the load really
//     depends on.
// Both rules follow the published design. At commit the record (violated,
// branch count and SQ index of the conflicting store, forwarding store's SQ
// index) is read out for training and the entry is freed.
//
// Interface (all updates at the clock edge, searches and commit read
// combinational on the current state):
//   al_*   allocate entry al_idx for the load with sequence number al_seq
//   ex_*   the load in ex_idx executed: its 8-byte-granule word address and
//          byte mask, and whether (and from which store) it was forwarded
//   st_*   ST_PORTS store address searches per cycle (2 by default, as the
//          two store execution ports of the evaluated core)
//   fl_*   branch-misprediction flush: free every load younger than fl_seq
//   cm_*   commit of the load in cm_idx
// Address granularity, widths and a search not seeing a load that executes
// in the same cycle are this implementation's choices. A load's later
// execution (ex_*) clears its forwarding and violation records.
module lq_violation_tracker
  import phast_pkg::*;
#(
  parameter int unsigned LQ_ENTRIES = 192,
  parameter int unsigned SQ_ENTRIES = 114,
  parameter int unsigned ST_PORTS   = 2,
  parameter int unsigned ADDR_BITS  = 61,
  localparam int unsigned LQI_BITS  = $clog2(LQ_ENTRIES),
  localparam int unsigned SQI_BITS  = $clog2(SQ_ENTRIES)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // allocation
  input  logic                  al_valid,
  input  logic [LQI_BITS-1:0]   al_idx,
  input  logic [SEQ_BITS-1:0]   al_seq,
  // load execution
  input  logic                  ex_valid,
  input  logic [LQI_BITS-1:0]   ex_idx,
  input  logic [ADDR_BITS-1:0]  ex_addr,
  input  logic [7:0]            ex_mask,
  input  logic                  ex_fwd_valid,
  input  logic [SEQ_BITS-1:0]   ex_fwd_seq,
  input  logic [SQI_BITS-1:0]   ex_fwd_sq,
  // store address searches
  input  logic                  st_valid [ST_PORTS],
  input  logic [SEQ_BITS-1:0]   st_seq   [ST_PORTS],
  input  logic [ADDR_BITS-1:0]  st_addr  [ST_PORTS],
  input  logic [7:0]            st_mask  [ST_PORTS],
  input  logic [BRCNT_BITS-1:0] st_brcnt [ST_PORTS],
  input  logic [SQI_BITS-1:0]   st_sq    [ST_PORTS],
  // flush of younger loads
  input  logic                  fl_valid,
  input  logic [SEQ_BITS-1:0]   fl_seq,
  // commit
  input  logic                  cm_valid,
  input  logic [LQI_BITS-1:0]   cm_idx,
  output logic                  cm_violated,
  output logic [BRCNT_BITS-1:0] cm_viol_brcnt,
  output logic [SQI_BITS-1:0]   cm_viol_sq,
  output logic                  cm_fwd_valid,
  output logic [SQI_BITS-1:0]   cm_fwd_sq,
  // event reports for this cycle's searches
  output logic                  ev_violation,  // some load newly recorded a violator
  output logic                  ev_filtered,   // a match ignored: load forwarded by a younger store
  output logic                  ev_replaced    // an older recorded violator was replaced
);

  typedef struct packed {
    logic                  valid;
    logic [SEQ_BITS-1:0]   seq;
    logic                  executed;
    logic [ADDR_BITS-1:0]  addr;
    logic [7:0]            mask;
    logic                  fwd_valid;
    logic [SEQ_BITS-1:0]   fwd_seq;
    logic [SQI_BITS-1:0]   fwd_sq;
    logic                  viol_valid;
    logic [SEQ_BITS-1:0]   viol_seq;
    logic [BRCNT_BITS-1:0] viol_brcnt;
    logic [SQI_BITS-1:0]   viol_sq;
  } lq_ent_t;

  lq_ent_t lq     [LQ_ENTRIES];
  lq_ent_t lq_nxt [LQ_ENTRIES];

  always_comb begin
    ev_violation = 1'b0;
    ev_filtered  = 1'b0;
    ev_replaced  = 1'b0;
    for (int i = 0; i < LQ_ENTRIES; i++) begin
      lq_nxt[i] = lq[i];
      for (int p = 0; p < ST_PORTS; p++) begin
        logic match;
        match = st_valid[p] && lq[i].valid && lq[i].executed
             && seq_older(st_seq[p], lq[i].seq)
             && st_addr[p] == lq[i].addr && (st_mask[p] & lq[i].mask) != '0;
        if (match) begin
          if (lq[i].fwd_valid && seq_older(st_seq[p], lq[i].fwd_seq)) begin
            ev_filtered = 1'b1;
          end else if (!lq_nxt[i].viol_valid) begin
            ev_violation         = 1'b1;
            lq_nxt[i].viol_valid = 1'b1;
            lq_nxt[i].viol_seq   = st_seq[p];
            lq_nxt[i].viol_brcnt = st_brcnt[p];
            lq_nxt[i].viol_sq    = st_sq[p];
          end else if (seq_older(lq_nxt[i].viol_seq, st_seq[p])) begin
            ev_replaced          = 1'b1;
            lq_nxt[i].viol_seq   = st_seq[p];
            lq_nxt[i].viol_brcnt = st_brcnt[p];
            lq_nxt[i].viol_sq    = st_sq[p];
          end
        end
      end
      if (fl_valid && lq[i].valid && seq_older(fl_seq, lq[i].seq))
        lq_nxt[i].valid = 1'b0;
    end
    // entry-specific updates override the search results
    if (ex_valid) begin
      lq_nxt[ex_idx].executed   = 1'b1;
      lq_nxt[ex_idx].addr       = ex_addr;
      lq_nxt[ex_idx].mask       = ex_mask;
      lq_nxt[ex_idx].fwd_valid  = ex_fwd_valid;
      lq_nxt[ex_idx].fwd_seq    = ex_fwd_seq;
      lq_nxt[ex_idx].fwd_sq     = ex_fwd_sq;
      lq_nxt[ex_idx].viol_valid = 1'b0;
    end
    if (cm_valid) lq_nxt[cm_idx].valid = 1'b0;
    if (al_valid) begin
      lq_nxt[al_idx]       = '0;
      lq_nxt[al_idx].valid = 1'b1;
      lq_nxt[al_idx].seq   = al_seq;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LQ_ENTRIES; i++) lq[i] <= '0;
    end else begin
      for (int i = 0; i < LQ_ENTRIES; i++) lq[i] <= lq_nxt[i];
    end
  end

  assign cm_violated   = cm_valid && lq[cm_idx].valid && lq[cm_idx].viol_valid;
  assign cm_viol_brcnt = lq[cm_idx].viol_brcnt;
  assign cm_viol_sq    = lq[cm_idx].viol_sq;
  assign cm_fwd_valid  = cm_valid && lq[cm_idx].valid && lq[cm_idx].fwd_valid;
  assign cm_fwd_sq     = lq[cm_idx].fwd_sq;

endmodule
