// phast_pkg: constants and types shared by the PHAST memory dependence
// predictor.
//
// PHAST keeps one tagged, 4-way set-associative table per history length.
// The lengths form the geometric-like sequence 0, 2, 4, 6, 8, 12, 16, 32
// divergent branches; each table has 128 sets and each entry holds a 16-bit
// tag, a 7-bit store distance, a 4-bit confidence counter and 2 LRU bits
// (29 bits, 8 x 512 x 29 bits = 14.5 KB). Those numbers follow the published
// configuration. The history entry layout {indirect, taken, 5 destination
// bits} follows the description of the global history register; the widths
// of PCs, sequence numbers, the branch counter and SQ/LQ indices are this
// implementation's choices.
package phast_pkg;

  // ---- predictor geometry (published configuration) ----
  localparam int unsigned NUM_TABLES = 8;
  localparam int unsigned SET_BITS   = 7;    // S: 128 sets per table
  localparam int unsigned TAG_BITS   = 16;   // T
  localparam int unsigned WAYS       = 4;
  localparam int unsigned DIST_BITS  = 7;    // store distance field
  localparam int unsigned CONF_BITS  = 4;    // confidence counter
  localparam int unsigned LRU_BITS   = 2;
  localparam int unsigned MAX_HIST   = 32;   // longest history length

  // history length of each table, shortest first
  typedef int unsigned hist_len_t [NUM_TABLES];
  localparam hist_len_t HIST_LEN = '{0, 2, 4, 6, 8, 12, 16, 32};

  // ---- global history entry: one per divergent branch ----
  localparam int unsigned DEST_BITS = 5;     // low bits of the destination
  typedef struct packed {
    logic                 indirect;  // 1: indirect branch, 0: conditional
    logic                 taken;
    logic [DEST_BITS-1:0] dest;      // destination actually followed
  } hist_entry_t;
  localparam int unsigned HENT_BITS = $bits(hist_entry_t);   // 7

  // the MAX_HIST youngest entries; element 0 is the youngest branch
  typedef hist_entry_t [MAX_HIST-1:0] hist_window_t;

  // ---- implementation widths (not given by the published design) ----
  localparam int unsigned PC_BITS    = 64;
  localparam int unsigned BRCNT_BITS = 10;   // 512 in flight + wrap bit
  localparam int unsigned SEQ_BITS   = 16;
  localparam int unsigned TBL_BITS   = $clog2(NUM_TABLES);

  // ---- one prediction table entry ----
  typedef struct packed {
    logic [TAG_BITS-1:0]  tag;
    logic [DIST_BITS-1:0] sdist;
    logic [CONF_BITS-1:0] conf;
    logic [LRU_BITS-1:0]  lru;   // age: 0 most recently used
  } entry_t;

  localparam logic [CONF_BITS-1:0] CONF_MAX = '1;

  // which table and entry produced a prediction; carried with the load to
  // commit so that its confidence can be updated
  typedef struct packed {
    logic [TBL_BITS-1:0] table_id;
    logic [SET_BITS-1:0] index;
    logic [TAG_BITS-1:0] tag;
  } provider_t;

  // ---- update commands to the predictor ----
  typedef enum logic [1:0] {
    UPD_ALLOC     = 2'd0,   // learn a new dependence
    UPD_CONF_OK   = 2'd1,   // predicted store was right: confidence to max
    UPD_CONF_FAIL = 2'd2    // predicted store was wrong: decrement
  } upd_op_t;

  // age comparison of wrapping sequence numbers: a is older than b
  function automatic logic seq_older(input logic [SEQ_BITS-1:0] a,
                                     input logic [SEQ_BITS-1:0] b);
    logic [SEQ_BITS-1:0] d;
    d = a - b;
    return d[SEQ_BITS-1];
  endfunction

endpackage
