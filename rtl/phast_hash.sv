// phast_hash: index and tag of one PHAST table.
//
// For a table of history length HLEN the path is formed from the HLEN
// youngest divergent branches: a conditional branch contributes its type
// and taken/not-taken bit, an indirect branch also its 5 destination bits,
// and the oldest branch of the window (the branch before the conflicting
// store, for a conflict whose length matches the table exactly) always
// contributes its destination, even when it is conditional. The 7-bit slots
// are concatenated and XOR-folded down to S+T = 23 bits. The load PC is
// hashed as PC ^ (PC>>2) ^ (PC>>5) for the index and PC ^ (PC>>3) ^ (PC>>7)
// for the tag; each is XORed with its part of the folded history (low S bits
// to the index, upper T bits to the tag).
//
// The history content, the 5 destination bits, the fold to S+T bits and the
// PC hashes follow the published design. Using fixed 7-bit slots (with the
// unused bits zero) and folding by XOR of consecutive 23-bit chunks are this
// implementation's choices. The same function is used for lookup (decode
// history) and for allocation (commit history), so both find the same entry.
//
// Purely combinational.
module phast_hash
  import phast_pkg::*;
#(
  parameter int unsigned HLEN = 8
) (
  input  logic [PC_BITS-1:0]  pc,
  input  hist_window_t        window,
  output logic [SET_BITS-1:0] index,
  output logic [TAG_BITS-1:0] tag
);

  localparam int unsigned FOLD_BITS = SET_BITS + TAG_BITS;
  localparam int unsigned HBITS     = (HLEN == 0) ? 1 : HLEN * HENT_BITS;

  logic [HBITS-1:0]     hbits;
  logic [FOLD_BITS-1:0] fold;
  logic [PC_BITS-1:0]   pc_idx, pc_tag;

  if (HLEN == 0) begin : g_nohist
    assign hbits = '0;
    assign fold  = '0;
  end else begin : g_hist
    always_comb begin
      for (int i = 0; i < int'(HLEN); i++) begin
        hist_entry_t e;
        e = window[i];
        if (i != int'(HLEN) - 1 && !e.indirect)
          e.dest = '0;                    // conditional: outcome only
        hbits[i*HENT_BITS +: HENT_BITS] = e;
      end
      fold = '0;
      for (int b = 0; b < int'(HBITS); b++)
        fold[b % FOLD_BITS] = fold[b % FOLD_BITS] ^ hbits[b];
    end
  end

  assign pc_idx = pc ^ (pc >> 2) ^ (pc >> 5);
  assign pc_tag = pc ^ (pc >> 3) ^ (pc >> 7);
  assign index  = pc_idx[SET_BITS-1:0] ^ fold[SET_BITS-1:0];
  assign tag    = pc_tag[TAG_BITS-1:0] ^ fold[FOLD_BITS-1:SET_BITS];

endmodule
