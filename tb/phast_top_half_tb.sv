// phast_top_half_tb: the end-to-end script of phast_top_tb run on the
// 7.25 KB budget point, 64 sets per table instead of 128. The scenario,
// expected values and counted mechanisms are the same; this shows the
// predictor works unchanged at half the storage.
//
// Other sizes as by default: 8 tables x 4 ways, 192-entry LQ, 114-entry SQ.
//
// A small in-order model of the surrounding core replays a script of
// load/store/branch sequences. Each step decodes, in program order:
// optionally an older store to the same address, the divergent branch b0
// before the conflicting store, the store S, m unrelated stores, N more
// divergent branches, and the load. The load is predicted at decode, its
// dependence is turned into an SQ index at LQ allocation, and it executes
// either after the store it waits for (forwarding from the youngest
// resolved same-address store) or before the unresolved stores, which then
// search the LQ. Branches and stores commit, the load commits and the
// trainer's command is checked. After each load a wrong-path branch is
// decoded and the history is recovered.
//
// Every step states the expected prediction (hit, distance, provider
// table), the SQ slot waited on, the squash, and the update (operation,
// table, distance, history length). The mechanisms exercised are counted
// and each must occur: violation squash, allocation, predicted wait,
// confidence reset and decrement, forwarding filter, youngest-violator
// replacement, history truncation, longest-history selection, LRU eviction
// and history recovery.
module phast_top_half_tb;
  import phast_pkg::*;
  localparam int SQ = 114, LQ = 192, P = 2, AB = 61;
  localparam int NONE = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // ---------------- DUT signals ----------------
  logic br_valid = 0, rec_valid = 0, rec_write = 0;
  hist_entry_t br_entry = '0, rec_entry = '0;
  logic [BRCNT_BITS-1:0] rec_count = '0, br_count;
  logic lk_valid = 0; logic [PC_BITS-1:0] lk_pc = '0; logic [7:0] lk_id = '0;
  logic pr_valid; logic [7:0] pr_id; logic pr_hit; logic [DIST_BITS-1:0] pr_dist;
  provider_t pr_provider;
  logic la_pred_hit = 0; logic [DIST_BITS-1:0] la_pred_dist = '0;
  logic [6:0] la_sq_last_idx = '0; logic [7:0] la_sq_count = '0;
  logic la_wait_valid; logic [6:0] la_wait_sq_idx;
  logic al_valid = 0; logic [7:0] al_idx = '0; logic [SEQ_BITS-1:0] al_seq = '0;
  logic ex_valid = 0; logic [7:0] ex_idx = '0; logic [AB-1:0] ex_addr = '0;
  logic [7:0] ex_mask = '0; logic ex_fwd_valid = 0;
  logic [SEQ_BITS-1:0] ex_fwd_seq = '0; logic [6:0] ex_fwd_sq = '0;
  logic st_valid [P]; logic [SEQ_BITS-1:0] st_seq [P]; logic [AB-1:0] st_addr [P];
  logic [7:0] st_mask [P]; logic [BRCNT_BITS-1:0] st_brcnt [P]; logic [6:0] st_sq [P];
  logic fl_valid = 0; logic [SEQ_BITS-1:0] fl_seq = '0;
  logic ev_violation, ev_filtered, ev_replaced;
  logic cb_valid = 0; hist_entry_t cb_entry = '0;
  logic cm_valid = 0; logic [7:0] cm_idx = '0; logic [PC_BITS-1:0] cm_pc = '0;
  logic [BRCNT_BITS-1:0] cm_ld_brcnt = '0; logic [6:0] cm_ld_last_sq = '0;
  logic cm_pred_hit = 0; provider_t cm_provider = '0; logic [6:0] cm_pred_sq = '0;
  logic cm_squash;
  logic up_valid; upd_op_t up_op; logic [TBL_BITS-1:0] up_table;
  logic [DIST_BITS-1:0] up_dist; logic [5:0] up_hlen; logic up_truncated;
  logic up_hit, up_evict;

  phast_top #(.SETS(64)) dut (.*);

  // ---------------- mechanism counters ----------------
  int n_squash = 0, n_alloc = 0, n_wait = 0, n_ok = 0, n_fail = 0, n_filtered = 0;
  int n_replaced = 0, n_trunc = 0, n_longest = 0, n_evict = 0, n_recover = 0;
  int n_cycles = 0;
  always @(posedge clk) if (rst_n) begin
    n_cycles++;
    if (ev_filtered) n_filtered++;
    if (ev_replaced) n_replaced++;
    if (up_valid && up_op == UPD_ALLOC) begin
      n_alloc++;
      if (up_truncated) n_trunc++;
      if (up_evict) n_evict++;
    end
    if (up_valid && up_op == UPD_CONF_OK) n_ok++;
    if (up_valid && up_op == UPD_CONF_FAIL) n_fail++;
    if (rec_valid) n_recover++;
  end

  initial begin
    repeat (100000) @(posedge clk);
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

  // ---------------- core model state ----------------
  int sq_tail = 0, sq_count = 0, lq_ptr = 0;
  int seq = 100;

  typedef struct {
    int idx, seq, brcnt;
    logic [AB-1:0] addr;
    bit late, resolved;
  } st_t;

  function automatic hist_entry_t path_branch(int path, int i, int n);
    int unsigned h;
    // path 5 ends with the two branches of path 4 (longest-match test)
    if (path == 5 && i == n)     return path_branch(4, 1, 1);
    if (path == 5 && i == n - 1) return path_branch(4, 0, 1);
    h = (path * 32'h9e3779b1) ^ ((i + 1) * 32'h85ebca6b);
    h = h ^ (h >> 13);
    h = h * 32'hc2b2ae35;
    return hist_entry_t'(h >> 9);
  endfunction

  task automatic clear_ports();
    br_valid = 0; rec_valid = 0; lk_valid = 0; al_valid = 0; ex_valid = 0;
    cb_valid = 0; cm_valid = 0; fl_valid = 0;
    for (int p = 0; p < P; p++) st_valid[p] = 0;
  endtask

  task automatic step_clk();
    @(negedge clk);
    clear_ports();
  endtask

  task automatic decode_branch(hist_entry_t e);
    br_valid = 1; br_entry = e; seq++;
    step_clk();
  endtask

  task automatic decode_store(logic [AB-1:0] a, bit late, output st_t s);
    s.idx = sq_tail; s.seq = seq++; s.brcnt = int'(br_count);
    s.addr = a; s.late = late; s.resolved = 0;
    sq_tail = (sq_tail + 1) % SQ;
    sq_count++;
  endtask

  st_t sts [$];   // stores of the current step, program order

  task automatic resolve(int k);
    st_valid[0] = 1; st_seq[0] = SEQ_BITS'(sts[k].seq); st_addr[0] = sts[k].addr;
    st_mask[0] = 8'hff; st_brcnt[0] = BRCNT_BITS'(sts[k].brcnt); st_sq[0] = 7'(sts[k].idx);
    sts[k].resolved = 1;
    step_clk();
  endtask

  // ---------------- one script step ----------------
  task automatic run_step(int stepno, logic [PC_BITS-1:0] pc, int path, int n, int m,
                          bit older, bit alias_st,
                          bit e_hit, int e_dist, int e_tbl,
                          int e_op, int e_utbl, int e_udist, int e_hlen, bit longest);
    st_t s;
    hist_entry_t brs [$];
    logic [AB-1:0] A;
    int ld_brcnt, ld_seq, lqi, s_pos, wait_pos, fwd_pos;
    logic p_hit; int p_dist; provider_t p_prov;
    logic w_valid; int w_idx;
    string tag;
    tag = $sformatf("step %0d", stepno);
    A = AB'(61'h4000 + path);
    sts.delete();
    // ---- decode ----
    if (older) begin decode_store(A, 1, s); sts.push_back(s); end
    brs.push_back(path_branch(path, 0, n));
    decode_branch(brs[$]);
    decode_store(alias_st ? AB'(61'h9000 + path) : A, 1, s);
    sts.push_back(s); s_pos = sts.size() - 1;
    for (int k = 0; k < m; k++) begin
      decode_store(AB'(61'h8000 + k), 0, s); sts.push_back(s);
    end
    for (int i = 1; i <= n; i++) begin
      brs.push_back(path_branch(path, i, n));
      decode_branch(brs[$]);
    end
    ld_brcnt = int'(br_count); ld_seq = seq++; lqi = lq_ptr; lq_ptr = (lq_ptr + 1) % LQ;
    lk_valid = 1; lk_pc = pc; lk_id = 8'(lqi);
    step_clk();
    step_clk();
    check({tag, " prediction ready after 2 cycles"}, {pr_valid, pr_id}, {1'b1, 8'(lqi)});
    p_hit = pr_hit; p_dist = int'(pr_dist); p_prov = pr_provider;
    check({tag, " hit"}, p_hit, e_hit);
    if (e_hit) begin
      check({tag, " distance"}, p_dist, e_dist);
      check({tag, " provider table"}, p_prov.table_id, e_tbl);
      if (longest && p_prov.table_id == TBL_BITS'(e_tbl)) n_longest++;
    end
    // a wrong-path branch after the load, then recovery with its outcome
    begin
      int slot;
      hist_entry_t good;
      slot = int'(br_count);
      good = path_branch(path, 99, 0);
      br_valid = 1; br_entry = ~good;
      step_clk();
      rec_valid = 1; rec_write = 1; rec_count = BRCNT_BITS'(slot); rec_entry = good;
      step_clk();
      check({tag, " recovered count"}, br_count, BRCNT_BITS'(slot + 1));
      brs.push_back(good);   // committed after the load
    end
    // ---- LQ allocation and dependence ----
    al_valid = 1; al_idx = 8'(lqi); al_seq = SEQ_BITS'(ld_seq);
    la_pred_hit = p_hit; la_pred_dist = DIST_BITS'(p_dist);
    la_sq_last_idx = 7'(sts[$].idx); la_sq_count = 8'(sq_count);
    #1;
    w_valid = la_wait_valid; w_idx = int'(la_wait_sq_idx);
    wait_pos = -1;
    if (p_hit) begin
      wait_pos = sts.size() - 1 - p_dist;
      check({tag, " waits"}, w_valid, 1);
      check({tag, " waited SQ slot"}, w_idx, sts[wait_pos].idx);
      n_wait++;
    end else begin
      check({tag, " no wait"}, w_valid, 0);
    end
    step_clk();
    // ---- execution ----
    foreach (sts[k]) if (!sts[k].late) resolve(k);
    if (wait_pos >= 0 && !sts[wait_pos].resolved) resolve(wait_pos);
    fwd_pos = -1;
    foreach (sts[k]) if (sts[k].resolved && sts[k].addr == A) fwd_pos = k;
    ex_valid = 1; ex_idx = 8'(lqi); ex_addr = A; ex_mask = 8'h0f;
    ex_fwd_valid = fwd_pos >= 0;
    ex_fwd_seq = fwd_pos >= 0 ? SEQ_BITS'(sts[fwd_pos].seq) : '0;
    ex_fwd_sq = fwd_pos >= 0 ? 7'(sts[fwd_pos].idx) : '0;
    step_clk();
    foreach (sts[k]) if (!sts[k].resolved) resolve(k);
    // ---- commit: branches and stores older than the load ----
    for (int i = 0; i <= n; i++) begin
      cb_valid = 1; cb_entry = brs[i];
      step_clk();
    end
    sq_count -= sts.size();
    // ---- commit the load ----
    cm_valid = 1; cm_idx = 8'(lqi); cm_pc = pc; cm_ld_brcnt = BRCNT_BITS'(ld_brcnt);
    cm_ld_last_sq = 7'(sts[$].idx); cm_pred_hit = p_hit; cm_provider = p_prov;
    cm_pred_sq = 7'(w_idx);
    #1;
    check({tag, " squash"}, cm_squash, e_op == UPD_ALLOC);
    if (cm_squash) n_squash++;
    step_clk();
    check({tag, " update issued"}, up_valid, e_op != NONE);
    if (e_op != NONE) check({tag, " update op"}, up_op, e_op);
    if (e_op == UPD_ALLOC) begin
      check({tag, " update table"}, up_table, e_utbl);
      check({tag, " update distance"}, up_dist, e_udist);
      check({tag, " history length"}, up_hlen, e_hlen);
    end
    step_clk();
    // the branch recovered after the load commits too
    cb_valid = 1; cb_entry = brs[$];
    step_clk();
  endtask

  // load PCs of five loads that share a set in the history-free table
  logic [PC_BITS-1:0] epc [5];
  function automatic logic [6:0] idx0(logic [PC_BITS-1:0] pc);
    logic [PC_BITS-1:0] h;
    h = pc ^ (pc >> 2) ^ (pc >> 5);
    return h[6:0];
  endfunction

  localparam logic [PC_BITS-1:0] PC1 = 64'h40_1000, PC2 = 64'h40_2040,
                                 PC3 = 64'h40_3080, PC4 = 64'h40_40c0;

  initial begin
    int k;
    clear_ports();
    k = 0;
    for (logic [PC_BITS-1:0] pc = 64'h50_0000; k < 5; pc += 4)
      if (idx0(pc) == 7'd42) begin epc[k] = pc; k++; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    step_clk();
    //        step pc   path n  m  old ali hit d  tbl op             utbl ud hlen longest
    run_step( 1, PC1, 1, 3, 2, 0, 0,  0, 0, 0, UPD_ALLOC,     2, 2, 4,  0);
    run_step( 2, PC1, 1, 3, 2, 0, 0,  1, 2, 2, UPD_CONF_OK,   0, 0, 0,  0);
    // Fig. 3(d): both stores late; the younger one must be learnt
    run_step( 3, PC2, 2, 9, 0, 1, 0,  0, 0, 0, UPD_ALLOC,     4, 0, 10, 0);
    // Fig. 3(c): waits for the younger store; the older one is filtered
    run_step( 4, PC2, 2, 9, 0, 1, 0,  1, 0, 4, UPD_CONF_OK,   0, 0, 0,  0);
    // same path, store now writes elsewhere: 15 false dependences
    for (int i = 0; i < 15; i++)
      run_step(5 + i, PC1, 1, 3, 2, 0, 1, 1, 2, 2, UPD_CONF_FAIL, 0, 0, 0, 0);
    run_step(20, PC1, 1, 3, 2, 0, 1,  0, 0, 0, NONE,          0, 0, 0,  0);
    run_step(21, PC1, 1, 3, 2, 0, 0,  0, 0, 0, UPD_ALLOC,     2, 2, 4,  0);
    run_step(22, PC1, 1, 3, 2, 0, 0,  1, 2, 2, UPD_CONF_OK,   0, 0, 0,  0);
    // short and long path of one load; the long one must win once learnt
    run_step(23, PC3, 4, 1, 0, 0, 0,  0, 0, 0, UPD_ALLOC,     1, 0, 2,  0);
    run_step(24, PC3, 4, 1, 0, 0, 0,  1, 0, 1, UPD_CONF_OK,   0, 0, 0,  0);
    run_step(25, PC3, 5, 7, 3, 0, 0,  1, 0, 1, UPD_ALLOC,     4, 3, 8,  0);
    run_step(26, PC3, 5, 7, 3, 0, 0,  1, 3, 4, UPD_CONF_OK,   0, 0, 0,  1);
    run_step(27, PC3, 4, 1, 0, 0, 0,  1, 0, 1, UPD_CONF_OK,   0, 0, 0,  0);
    // path longer than the longest table: truncated to 32
    run_step(28, PC4, 6, 40, 1, 0, 0, 0, 0, 0, UPD_ALLOC,     7, 1, 41, 0);
    run_step(29, PC4, 6, 40, 1, 0, 0, 1, 1, 7, UPD_CONF_OK,   0, 0, 0,  0);
    // five loads in one set of the history-free table: LRU eviction
    for (int i = 0; i < 5; i++)
      run_step(30 + i, epc[i], 10 + i, 0, 0, 0, 0, 0, 0, 0, UPD_ALLOC, 0, 0, 1, 0);
    run_step(35, epc[0], 10, 0, 0, 0, 0, 0, 0, 0, UPD_ALLOC,  0, 0, 1,  0);
    run_step(36, epc[4], 14, 0, 0, 0, 0, 1, 0, 0, UPD_CONF_OK, 0, 0, 0, 0);
    // earlier dependences are still predicted
    run_step(37, PC2, 2, 9, 0, 1, 0,  1, 0, 4, UPD_CONF_OK,   0, 0, 0,  0);
    run_step(38, PC4, 6, 40, 1, 0, 0, 1, 1, 7, UPD_CONF_OK,   0, 0, 0,  0);

    $display("mechanisms: squash=%0d alloc=%0d wait=%0d conf_ok=%0d conf_fail=%0d",
             n_squash, n_alloc, n_wait, n_ok, n_fail);
    $display("            filtered=%0d replaced=%0d truncated=%0d longest=%0d evict=%0d recover=%0d cycles=%0d",
             n_filtered, n_replaced, n_trunc, n_longest, n_evict, n_recover, n_cycles);
    check("mechanism squash",    n_squash   > 0, 1);
    check("mechanism alloc",     n_alloc    > 0, 1);
    check("mechanism wait",      n_wait     > 0, 1);
    check("mechanism conf_ok",   n_ok       > 0, 1);
    check("mechanism conf_fail", n_fail     > 0, 1);
    check("mechanism filtered",  n_filtered > 0, 1);
    check("mechanism replaced",  n_replaced > 0, 1);
    check("mechanism truncated", n_trunc    > 0, 1);
    check("mechanism longest",   n_longest  > 0, 1);
    check("mechanism evict",     n_evict    > 0, 1);
    check("mechanism recover",   n_recover  > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
