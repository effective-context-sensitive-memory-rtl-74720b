// dep_propagate_tb: random predicted distances, youngest-store indices and
// SQ occupancies against a reference that walks back through the circular
// 114-entry store queue one slot at a time.
module dep_propagate_tb;
  import phast_pkg::*;
  localparam int SQ = 114;

  int checks = 0, failures = 0;
  logic                 pred_hit;
  logic [DIST_BITS-1:0] pred_dist;
  logic [6:0]           sq_last_idx;
  logic [7:0]           sq_count;
  logic                 wait_valid;
  logic [6:0]           wait_sq_idx;

  dep_propagate dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      int idx, exp_v;
      pred_hit    = ($urandom % 4) != 0;
      pred_dist   = DIST_BITS'($urandom % 128);
      sq_last_idx = 7'($urandom % SQ);
      sq_count    = 8'($urandom % (SQ + 1));
      if (it < 4) begin        // corner cases: wrap below slot 0
        pred_hit = 1; sq_last_idx = 7'(it); pred_dist = 7'(it + 1); sq_count = 8'(SQ);
      end
      #1;
      idx = int'(sq_last_idx);
      for (int k = 0; k < int'(pred_dist); k++) idx = (idx == 0) ? SQ - 1 : idx - 1;
      exp_v = (pred_hit && int'(pred_dist) < int'(sq_count)) ? 1 : 0;
      checks++;
      if (wait_valid !== exp_v[0] || (exp_v != 0 && int'(wait_sq_idx) != idx)) begin
        failures++;
        $display("FAIL dist=%0d last=%0d cnt=%0d: got %0d/%0d expected %0d/%0d",
                 pred_dist, sq_last_idx, sq_count, wait_valid, wait_sq_idx, exp_v, idx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
