// commit_history: commit-side global history of divergent branches.
//
// A shift register of the MAX_HIST most recently committed conditional and
// indirect branches, element 0 being the youngest. Because loads commit in
// program order, when a load commits this register holds exactly the
// branches that precede it, so training can read the path from a
// conflicting store to the load here. Keeping a commit-time copy of the
// history follows the published design; the shift-register form and the
// reset to all zeros are this implementation's choices.
//
// Interface and timing: cb_valid/cb_entry shift one committed branch in at
// the clock edge; window is the registered history (visible the cycle after
// the branch commits). One branch commits per cycle.
module commit_history
  import phast_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cb_valid,
  input  hist_entry_t  cb_entry,
  output hist_window_t window
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)
      window <= '0;
    else if (cb_valid)
      window <= {window[MAX_HIST-2:0], cb_entry};
  end

endmodule
