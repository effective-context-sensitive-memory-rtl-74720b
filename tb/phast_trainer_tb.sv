// phast_trainer_tb: random committing loads against a reference of the
// training rules: history length N+1 from the branch counters (with
// counter wrap), truncation to the table lengths 0,2,4,6,8,12,16,32, store
// distance from the SQ indices modulo 114, the choice between allocation
// and confidence update, the lazy squash and the one-cycle command latency.
module phast_trainer_tb;
  import phast_pkg::*;
  localparam int SQ = 114;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, n_trunc = 0, n_alloc = 0, n_ok = 0, n_fail = 0;

  logic                  cm_valid = 0;
  logic [PC_BITS-1:0]    cm_pc = '0;
  logic [BRCNT_BITS-1:0] cm_ld_brcnt = '0;
  logic [6:0]            cm_ld_last_sq = '0;
  logic                  cm_pred_hit = 0;
  provider_t             cm_provider = '0;
  logic [6:0]            cm_pred_sq = '0;
  logic                  cm_fwd_valid = 0;
  logic [6:0]            cm_fwd_sq = '0;
  logic                  cm_violated = 0;
  logic [BRCNT_BITS-1:0] cm_viol_brcnt = '0;
  logic [6:0]            cm_viol_sq = '0;
  hist_window_t          cm_window = '0;
  logic                  cm_squash;
  logic                  up_valid;
  upd_op_t               up_op;
  logic [PC_BITS-1:0]    up_pc;
  hist_window_t          up_window;
  logic [TBL_BITS-1:0]   up_table;
  logic [DIST_BITS-1:0]  up_dist;
  provider_t             up_provider;
  logic [5:0]            up_hlen;
  logic                  up_truncated;

  phast_trainer dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      int n, len, tbl, d, exp_op;
      logic exp_valid;
      @(negedge clk);
      cm_valid      = ($urandom % 5) != 0;
      cm_pc         = {$urandom, $urandom};
      n             = (it % 4 == 0) ? int'($urandom % 40) : int'($urandom % 13);
      cm_ld_brcnt   = BRCNT_BITS'($urandom);
      cm_viol_brcnt = cm_ld_brcnt - BRCNT_BITS'(n);
      cm_ld_last_sq = 7'($urandom % SQ);
      cm_viol_sq    = 7'($urandom % SQ);
      cm_violated   = ($urandom % 2) != 0;
      cm_pred_hit   = ($urandom % 2) != 0;
      cm_provider   = provider_t'({$urandom, $urandom});
      cm_pred_sq    = 7'($urandom % SQ);
      cm_fwd_valid  = ($urandom % 2) != 0;
      cm_fwd_sq     = ($urandom % 2) ? cm_pred_sq : 7'($urandom % SQ);
      for (int i = 0; i < MAX_HIST; i++) cm_window[i] = hist_entry_t'($urandom);
      #1;
      check("squash", cm_squash, cm_valid && cm_violated);
      // reference
      len = n + 1;
      tbl = 0;
      for (int t = 0; t < NUM_TABLES; t++) if (len >= int'(HIST_LEN[t])) tbl = t;
      d = int'(cm_ld_last_sq) - int'(cm_viol_sq);
      if (d < 0) d += SQ;
      exp_valid = cm_valid && (cm_violated || cm_pred_hit);
      if (cm_violated) exp_op = UPD_ALLOC;
      else if (cm_fwd_valid && cm_fwd_sq == cm_pred_sq) exp_op = UPD_CONF_OK;
      else exp_op = UPD_CONF_FAIL;
      @(posedge clk);
      #1;
      check("up_valid", up_valid, exp_valid);
      if (exp_valid) begin
        check("op", up_op, exp_op);
        check("pc", 32'(up_pc), 32'(cm_pc));
        check("window", 32'(up_window[31]), 32'(cm_window[31]));
        if (exp_op == UPD_ALLOC) begin
          n_alloc++;
          check("table", up_table, tbl);
          check("hlen", up_hlen, len);
          check("distance", up_dist, d);
          if (up_truncated) n_trunc++;
          check("truncated flag", up_truncated, len != int'(HIST_LEN[tbl]));
        end else begin
          if (exp_op == UPD_CONF_OK) n_ok++; else n_fail++;
          check("provider", 32'(up_provider), 32'(cm_provider));
        end
      end
    end
    check("coverage", (n_trunc > 50 && n_alloc > 200 && n_ok > 50 && n_fail > 50), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
