// phast_predictor_tb: the eight-table predictor at its default size.
// Allocates dependences into chosen tables with the history seen at commit,
// then looks them up with the same history at decode, and checks:
// two-cycle lookup latency, hit/miss, the returned distance and provider,
// that the longest matching history wins, that a zero-confidence longer
// entry falls back to a shorter one, that a different path beyond a short
// table's length still hits that table, and one lookup per cycle.
module phast_predictor_tb;
  import phast_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                 lk_valid = 0;
  logic [PC_BITS-1:0]   lk_pc = '0;
  hist_window_t         lk_window = '0;
  logic [7:0]           lk_id = '0;
  logic                 pr_valid;
  logic [7:0]           pr_id;
  logic                 pr_hit;
  logic [DIST_BITS-1:0] pr_dist;
  provider_t            pr_provider;
  logic                 up_valid = 0;
  upd_op_t              up_op = UPD_ALLOC;
  logic [PC_BITS-1:0]   up_pc = '0;
  hist_window_t         up_window = '0;
  logic [TBL_BITS-1:0]  up_table = '0;
  logic [DIST_BITS-1:0] up_dist = '0;
  provider_t            up_provider = '0;
  logic                 up_hit, up_evict;

  phast_predictor dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
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

  task automatic alloc(logic [PC_BITS-1:0] pc, hist_window_t w, int t, int d);
    @(negedge clk);
    up_valid = 1; up_op = UPD_ALLOC; up_pc = pc; up_window = w;
    up_table = TBL_BITS'(t); up_dist = DIST_BITS'(d);
    @(negedge clk);
    up_valid = 0;
  endtask

  task automatic conf(upd_op_t op, provider_t p);
    @(negedge clk);
    up_valid = 1; up_op = op; up_provider = p;
    @(negedge clk);
    up_valid = 0;
  endtask

  // request at one negedge; answer must appear exactly two cycles later
  task automatic predict(logic [PC_BITS-1:0] pc, hist_window_t w, int id,
                         output logic hit, output int d, output provider_t p);
    @(negedge clk);
    lk_valid = 1; lk_pc = pc; lk_window = w; lk_id = 8'(id);
    @(negedge clk);
    lk_valid = 0;
    check("not yet valid after 1 cycle", pr_valid, 0);
    @(negedge clk);
    check("valid after 2 cycles", pr_valid, 1);
    check("id returned", pr_id, 8'(id));
    hit = pr_hit; d = int'(pr_dist); p = pr_provider;
  endtask

  hist_window_t w1, w2;
  logic [PC_BITS-1:0] pcA;
  logic h; int d; provider_t p;

  initial begin
    for (int i = 0; i < MAX_HIST; i++) w1[i] = hist_entry_t'($urandom);
    pcA = 64'h0000_7f00_1234_5678;
    repeat (3) @(posedge clk);
    rst_n = 1;
    predict(pcA, w1, 1, h, d, p);
    check("cold miss", h, 0);
    // dependence with a 4-branch path (table 2)
    alloc(pcA, w1, 2, 9);
    predict(pcA, w1, 2, h, d, p);
    check("hit table 2", h, 1);
    check("distance 9", d, 9);
    check("provider table", p.table_id, 2);
    // a path that differs only beyond 4 branches still hits table 2
    w2 = w1; w2[10] = ~w1[10]; w2[5] = ~w1[5];
    predict(pcA, w2, 3, h, d, p);
    check("same 4-branch path hits", h, 1);
    check("same 4-branch path distance", d, 9);
    // a different recent path misses
    w2 = w1; w2[0].indirect = 1; w2[0].dest = ~w1[0].dest;
    predict(pcA, w2, 4, h, d, p);
    check("different path misses", h, 0);
    // a longer-history entry for the same load wins
    alloc(pcA, w1, 6, 21);
    predict(pcA, w1, 5, h, d, p);
    check("longest hit", h, 1);
    check("longest distance", d, 21);
    check("longest provider", p.table_id, 6);
    // with a different path in branches 5..16 only table 2 matches
    w2 = w1; w2[12] = ~w1[12]; w2[12].indirect = 1;
    predict(pcA, w2, 6, h, d, p);
    check("fallback to shorter table", p.table_id, 2);
    check("fallback distance", d, 9);
    // drive the table-6 entry's confidence to zero: table 2 takes over
    predict(pcA, w1, 7, h, d, p);
    for (int i = 0; i < 15; i++) conf(UPD_CONF_FAIL, p);
    predict(pcA, w1, 8, h, d, p);
    check("zero confidence skipped", p.table_id, 2);
    check("zero confidence distance", d, 9);
    // another load PC is independent
    predict(pcA + 64'h40, w1, 9, h, d, p);
    check("other PC misses", h, 0);
    // length-0 table: any path
    alloc(pcA + 64'h40, w1, 0, 1);
    predict(pcA + 64'h40, w2, 10, h, d, p);
    check("length-0 entry hit", {h, 8'(d), 8'(p.table_id)}, {1'b1, 8'd1, 8'd0});
    // back-to-back lookups
    @(negedge clk);
    lk_valid = 1; lk_pc = pcA; lk_window = w1; lk_id = 8'd20;
    @(negedge clk);
    lk_pc = pcA + 64'h40; lk_id = 8'd21;
    @(negedge clk);
    lk_valid = 0;
    check("b2b first", {pr_valid, pr_id, 8'(pr_dist)}, {1'b1, 8'd20, 8'd9});
    @(negedge clk);
    check("b2b second", {pr_valid, pr_id, 8'(pr_dist)}, {1'b1, 8'd21, 8'd1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
