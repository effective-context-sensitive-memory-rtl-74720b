// dep_propagate: turns a predicted store distance into a store to wait for.
//
// When a load with a predicted dependence is allocated in the load queue,
// the store it must wait for is found by subtracting the predicted distance
// from the SQ index of the most recently allocated store (distance 0 is
// the youngest older store). That SQ index then serves as the tag the load
// waits on in the scheduler. This follows the published design. The SQ is a
// circular buffer of SQ_ENTRIES slots (114 by default, the store buffer size
// of the evaluated core), so the subtraction wraps modulo SQ_ENTRIES. If
// the distance reaches past the stores still in the SQ (dist >= sq_count),
// the store has already left and the load need not wait; that check is this
// implementation's choice.
//
// Purely combinational.
module dep_propagate
  import phast_pkg::*;
#(
  parameter int unsigned SQ_ENTRIES = 114,
  localparam int unsigned SQI_BITS  = $clog2(SQ_ENTRIES)
) (
  input  logic                 pred_hit,
  input  logic [DIST_BITS-1:0] pred_dist,
  input  logic [SQI_BITS-1:0]  sq_last_idx,  // youngest store in the SQ
  input  logic [SQI_BITS:0]    sq_count,     // stores in the SQ
  output logic                 wait_valid,
  output logic [SQI_BITS-1:0]  wait_sq_idx
);

  logic [DIST_BITS:0] d;
  logic [SQI_BITS:0]  diff;

  always_comb begin
    d          = {1'b0, pred_dist};
    wait_valid = pred_hit && (32'(d) < 32'(sq_count));
    if (32'(sq_last_idx) >= 32'(d))
      diff = (SQI_BITS+1)'(32'(sq_last_idx) - 32'(d));
    else
      diff = (SQI_BITS+1)'(32'(sq_last_idx) + SQ_ENTRIES - 32'(d));
    wait_sq_idx = wait_valid ? SQI_BITS'(diff) : '0;
  end

endmodule
