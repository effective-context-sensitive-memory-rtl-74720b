// phast_predictor: the PHAST store-distance predictor.
//
// Eight phast_table instances, one per history length (0, 2, 4, 6, 8, 12,
// 16, 32 divergent branches), are searched in parallel for every load, like
// the components of a TAGE predictor. If several tables hold the load's
// tag with non-zero confidence, the one with the longest history wins and
// its store distance is the prediction; with no such match the load is
// predicted independent. The winning table, set and tag are returned as the
// provider so that the load can update that entry's confidence at commit.
// All of this follows the published design.
//
// Lookup timing (this implementation's choice; the design only asks that
// the prediction be ready before the load enters the issue queue): a
// request in cycle t (lk_valid, load PC, decode-time history window, and an
// opaque lk_id such as the LQ slot) is answered in cycle t+2 by pr_valid,
// pr_id, pr_hit, pr_dist and pr_provider. One request per cycle.
//
// Update port, applied at the clock edge of the cycle it is presented:
//   UPD_ALLOC      up_table selects the table; its index and tag are
//                  computed from up_pc and up_window (the commit-time
//                  history), and up_dist is written.
//   UPD_CONF_OK / UPD_CONF_FAIL  act on up_provider's entry.
// up_hit/up_evict pass on the selected table's report.
module phast_predictor
  import phast_pkg::*;
#(
  parameter int unsigned SETS    = 2 ** SET_BITS,
  parameter int unsigned ID_BITS = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  logic                 lk_valid,
  input  logic [PC_BITS-1:0]   lk_pc,
  input  hist_window_t         lk_window,
  input  logic [ID_BITS-1:0]   lk_id,
  output logic                 pr_valid,
  output logic [ID_BITS-1:0]   pr_id,
  output logic                 pr_hit,
  output logic [DIST_BITS-1:0] pr_dist,
  output provider_t            pr_provider,
  // update
  input  logic                 up_valid,
  input  upd_op_t              up_op,
  input  logic [PC_BITS-1:0]   up_pc,
  input  hist_window_t         up_window,
  input  logic [TBL_BITS-1:0]  up_table,
  input  logic [DIST_BITS-1:0] up_dist,
  input  provider_t            up_provider,
  output logic                 up_hit,
  output logic                 up_evict
);

  logic [SET_BITS-1:0]  lk_idx  [NUM_TABLES];
  logic [TAG_BITS-1:0]  lk_tg   [NUM_TABLES];
  logic [SET_BITS-1:0]  al_idx  [NUM_TABLES];
  logic [TAG_BITS-1:0]  al_tg   [NUM_TABLES];
  logic                 t_hit   [NUM_TABLES];
  logic [DIST_BITS-1:0] t_dist  [NUM_TABLES];
  logic                 t_uphit [NUM_TABLES];
  logic                 t_upev  [NUM_TABLES];

  // table-select for the update port
  logic [TBL_BITS-1:0]  u_tbl;
  logic [SET_BITS-1:0]  u_idx;
  logic [TAG_BITS-1:0]  u_tag;

  always_comb begin
    if (up_op == UPD_ALLOC) begin
      u_tbl = up_table;
      u_idx = al_idx[up_table];
      u_tag = al_tg[up_table];
    end else begin
      u_tbl = up_provider.table_id;
      u_idx = up_provider.index;
      u_tag = up_provider.tag;
    end
  end

  for (genvar t = 0; t < NUM_TABLES; t++) begin : g_tbl
    phast_hash #(.HLEN(HIST_LEN[t])) u_lk_hash (
      .pc(lk_pc), .window(lk_window), .index(lk_idx[t]), .tag(lk_tg[t]));
    phast_hash #(.HLEN(HIST_LEN[t])) u_al_hash (
      .pc(up_pc), .window(up_window), .index(al_idx[t]), .tag(al_tg[t]));

    logic [1:0] way_unused;
    phast_table #(.SETS(SETS)) u_table (
      .clk, .rst_n,
      .lk_valid(lk_valid), .lk_index(lk_idx[t]), .lk_tag(lk_tg[t]),
      .lk_hit(t_hit[t]), .lk_dist(t_dist[t]), .lk_way(way_unused),
      .up_valid(up_valid && u_tbl == TBL_BITS'(t)), .up_op(up_op),
      .up_index(u_idx), .up_tag(u_tag), .up_dist(up_dist),
      .up_hit(t_uphit[t]), .up_evict(t_upev[t]));
  end

  assign up_hit   = t_uphit[u_tbl];
  assign up_evict = t_upev[u_tbl];

  // ---- stage 1: remember request id and per-table index/tag ----
  logic                s1_valid;
  logic [ID_BITS-1:0]  s1_id;
  logic [SET_BITS-1:0] s1_idx [NUM_TABLES];
  logic [TAG_BITS-1:0] s1_tg  [NUM_TABLES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_id    <= '0;
      for (int t = 0; t < NUM_TABLES; t++) begin
        s1_idx[t] <= '0;
        s1_tg[t]  <= '0;
      end
    end else begin
      s1_valid <= lk_valid;
      if (lk_valid) begin
        s1_id <= lk_id;
        for (int t = 0; t < NUM_TABLES; t++) begin
          s1_idx[t] <= lk_idx[t];
          s1_tg[t]  <= lk_tg[t];
        end
      end
    end
  end

  // ---- stage 2: longest matching history wins ----
  logic                 sel_hit;
  logic [DIST_BITS-1:0] sel_dist;
  provider_t            sel_prov;

  always_comb begin
    sel_hit  = 1'b0;
    sel_dist = '0;
    sel_prov = '0;
    for (int t = 0; t < NUM_TABLES; t++)
      if (t_hit[t]) begin
        sel_hit           = 1'b1;
        sel_dist          = t_dist[t];
        sel_prov.table_id = TBL_BITS'(t);
        sel_prov.index    = s1_idx[t];
        sel_prov.tag      = s1_tg[t];
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pr_valid    <= 1'b0;
      pr_id       <= '0;
      pr_hit      <= 1'b0;
      pr_dist     <= '0;
      pr_provider <= '0;
    end else begin
      pr_valid <= s1_valid;
      if (s1_valid) begin
        pr_id       <= s1_id;
        pr_hit      <= sel_hit;
        pr_dist     <= sel_dist;
        pr_provider <= sel_prov;
      end
    end
  end

endmodule
