// phast_table: one PHAST prediction table.
//
// A SETS x WAYS set-associative array of {tag, store distance, confidence,
// LRU age} entries (by default 128 sets x 4 ways of 16+7+4+2 bits, the
// published configuration). An entry predicts only while its confidence is
// non-zero, so zero confidence also marks an empty entry.
//
// Lookup port (pipelined, one per cycle): lk_valid, lk_index and lk_tag are
// registered with the addressed set; in the next cycle lk_hit says that one
// of its ways holds lk_tag with non-zero confidence, and lk_dist/lk_way give
// that entry.
//
// Update port (one per cycle, applied at the clock edge):
//   UPD_ALLOC      learn a dependence: a way already holding the tag is
//                  overwritten; otherwise an empty way (confidence zero),
//                  otherwise the least recently used way. The store
//                  distance is written and the confidence set to maximum.
//   UPD_CONF_OK    the predicted store was the right one: confidence back
//                  to maximum.
//   UPD_CONF_FAIL  the load waited for the wrong store: confidence minus one.
// The confidence policy follows the published design. Which way is
// replaced beyond "LRU", and that only updates (not speculative lookups)
// refresh the LRU ages, are this implementation's choices. up_hit and
// up_evict report, in the update cycle, whether the tag was found and
// whether an allocation displaced a live entry.
//
// Storage: the tags and distances of a set are one word of a memory with a
// registered read for lookups and an asynchronous read for updates; the
// confidence counters and LRU ages are registers, cleared by reset so the
// table starts empty. A lookup in the same cycle as an update of the same
// set sees the old set.
module phast_table
  import phast_pkg::*;
#(
  parameter int unsigned SETS = 2 ** SET_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // lookup
  input  logic                 lk_valid,
  input  logic [SET_BITS-1:0]  lk_index,
  input  logic [TAG_BITS-1:0]  lk_tag,
  output logic                 lk_hit,
  output logic [DIST_BITS-1:0] lk_dist,
  output logic [1:0]           lk_way,
  // update
  input  logic                 up_valid,
  input  upd_op_t              up_op,
  input  logic [SET_BITS-1:0]  up_index,
  input  logic [TAG_BITS-1:0]  up_tag,
  input  logic [DIST_BITS-1:0] up_dist,
  output logic                 up_hit,
  output logic                 up_evict
);

  localparam int unsigned IW = $clog2(SETS);

  // Tags and distances of a set form one memory word (no reset needed);
  // confidence and LRU ages are kept in registers so that reset can empty
  // the table.
  typedef struct packed {
    logic [TAG_BITS-1:0]  tag;
    logic [DIST_BITS-1:0] sdist;
  } td_t;
  typedef td_t [WAYS-1:0] td_set_t;
  typedef struct packed {
    logic [CONF_BITS-1:0] conf;
    logic [LRU_BITS-1:0]  lru;    // age: 0 most recently used
  } cl_t;
  typedef cl_t [WAYS-1:0] cl_set_t;

  td_set_t tdmem [SETS];
  cl_set_t clreg [SETS];

  // ---------------- lookup ----------------
  td_set_t             rd_td;
  cl_set_t             rd_cl;
  logic                rd_valid;
  logic [TAG_BITS-1:0] rd_tag;

  always_ff @(posedge clk) begin
    if (lk_valid) rd_td <= tdmem[lk_index[IW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_tag   <= '0;
      rd_cl    <= '0;
    end else begin
      rd_valid <= lk_valid;
      if (lk_valid) begin
        rd_tag <= lk_tag;
        rd_cl  <= clreg[lk_index[IW-1:0]];
      end
    end
  end

  always_comb begin
    lk_hit  = 1'b0;
    lk_dist = '0;
    lk_way  = '0;
    for (int w = WAYS - 1; w >= 0; w--)
      if (rd_valid && rd_td[w].tag == rd_tag && rd_cl[w].conf != '0) begin
        lk_hit  = 1'b1;
        lk_dist = rd_td[w].sdist;
        lk_way  = 2'(w);
      end
  end

  // ---------------- update ----------------
  td_set_t    cur_td, nxt_td;
  cl_set_t    cur_cl, nxt_cl;
  logic [1:0] match_way, free_way, lru_way, sel_way;
  logic       match, free;

  always_comb begin
    cur_td = tdmem[up_index[IW-1:0]];
    cur_cl = clreg[up_index[IW-1:0]];
    match = 1'b0; match_way = '0;
    free  = 1'b0; free_way  = '0;
    lru_way = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (cur_td[w].tag == up_tag)     begin match = 1'b1; match_way = 2'(w); end
      if (cur_cl[w].conf == '0)        begin free  = 1'b1; free_way  = 2'(w); end
      if (cur_cl[w].lru == 2'(WAYS - 1)) lru_way = 2'(w);
    end
    // allocation target; a confidence update touches only a matching way
    sel_way = match ? match_way : (free ? free_way : lru_way);

    nxt_td = cur_td;
    nxt_cl = cur_cl;
    if (up_op == UPD_ALLOC) begin
      nxt_td[sel_way].tag   = up_tag;
      nxt_td[sel_way].sdist = up_dist;
      nxt_cl[sel_way].conf  = CONF_MAX;
    end else if (up_op == UPD_CONF_OK) begin
      nxt_cl[sel_way].conf  = CONF_MAX;
    end else if (up_op == UPD_CONF_FAIL) begin
      if (cur_cl[sel_way].conf != '0) nxt_cl[sel_way].conf = cur_cl[sel_way].conf - 1'b1;
    end
    // LRU: the touched way becomes youngest, younger ones age by one
    for (int w = 0; w < WAYS; w++)
      if (cur_cl[w].lru < cur_cl[sel_way].lru) nxt_cl[w].lru = cur_cl[w].lru + 1'b1;
    nxt_cl[sel_way].lru = '0;

    up_hit   = up_valid && match;
    up_evict = up_valid && up_op == UPD_ALLOC && !match && !free;
  end

  logic up_write;
  assign up_write = up_valid && (up_op == UPD_ALLOC || match);

  always_ff @(posedge clk) begin
    if (up_write && up_op == UPD_ALLOC) tdmem[up_index[IW-1:0]] <= nxt_td;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++) begin
          clreg[s][w].conf <= '0;
          clreg[s][w].lru  <= 2'(w);
        end
    end else if (up_write) begin
      clreg[up_index[IW-1:0]] <= nxt_cl;
    end
  end

endmodule
