// branch_history: decode-side divergent-branch counter and speculative
// global history.
//
// Every conditional or indirect branch that is decoded is written into a
// circular buffer at the slot given by the running divergent-branch counter,
// and the counter advances. Loads and stores copy the counter when they are
// decoded (br_count); the difference between a load's and a store's copies is
// the number of divergent branches between them. The MAX_HIST youngest
// entries are presented as a window (element 0 = youngest) for the
// predictor's lookup at decode.
//
// Each entry is {indirect, taken, 5 low destination bits}, as the published
// design records per divergent branch. The counter is wide enough for the
// branches in flight plus a wrap bit, again as described. How the
// speculative history recovers from a mispredicted branch is not described;
// here the buffer has one slot per counter value (2**BRCNT_BITS slots), so
// recovery only rewinds the counter to the mispredicted branch's slot,
// optionally rewriting that slot with the corrected outcome. Entries older
// than the rewind point are untouched, so the history stays exact as long as
// fewer than 2**BRCNT_BITS - MAX_HIST branches are in flight.
//
// Interface and timing:
//   br_valid/br_entry  one divergent branch decoded this cycle; it takes
//                      slot br_count, and br_count is incremented at the edge.
//   rec_valid          rewind to rec_count; with rec_write, slot rec_count
//                      is rewritten with rec_entry and the counter becomes
//                      rec_count+1. Recovery has priority over br_valid.
//   window             combinational view of the current history.
module branch_history
  import phast_pkg::*;
#(
  parameter int unsigned CNT_BITS = BRCNT_BITS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                br_valid,
  input  hist_entry_t         br_entry,
  input  logic                rec_valid,
  input  logic                rec_write,
  input  logic [CNT_BITS-1:0] rec_count,
  input  hist_entry_t         rec_entry,
  output logic [CNT_BITS-1:0] br_count,
  output hist_window_t        window
);

  localparam int unsigned DEPTH = 2 ** CNT_BITS;

  hist_entry_t         hbuf [DEPTH];
  logic [CNT_BITS-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt <= '0;
      for (int i = 0; i < DEPTH; i++) hbuf[i] <= '0;
    end else if (rec_valid) begin
      if (rec_write) begin
        hbuf[rec_count] <= rec_entry;
        cnt             <= rec_count + 1'b1;
      end else begin
        cnt             <= rec_count;
      end
    end else if (br_valid) begin
      hbuf[cnt] <= br_entry;
      cnt       <= cnt + 1'b1;
    end
  end

  assign br_count = cnt;

  always_comb begin
    for (int i = 0; i < MAX_HIST; i++)
      window[i] = hbuf[CNT_BITS'(cnt - CNT_BITS'(i + 1))];
  end

endmodule
