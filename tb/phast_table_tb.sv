// phast_table_tb: directed test of one PHAST table at its default size
// (128 sets x 4 ways). Checks the one-cycle lookup latency, allocation and
// lookup of the stored distance, overwrite of an entry with the same tag,
// confidence decrement down to zero (entry stops predicting), confidence
// reset to maximum, filling a set and replacing its least recently used way.
module phast_table_tb;
  import phast_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, cycles = 0;

  logic                 lk_valid = 0;
  logic [SET_BITS-1:0]  lk_index = '0;
  logic [TAG_BITS-1:0]  lk_tag = '0;
  logic                 lk_hit;
  logic [DIST_BITS-1:0] lk_dist;
  logic [1:0]           lk_way;
  logic                 up_valid = 0;
  upd_op_t              up_op = UPD_ALLOC;
  logic [SET_BITS-1:0]  up_index = '0;
  logic [TAG_BITS-1:0]  up_tag = '0;
  logic [DIST_BITS-1:0] up_dist = '0;
  logic                 up_hit, up_evict;

  phast_table dut (.*);

  always @(posedge clk) cycles++;
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

  task automatic update(upd_op_t op, int idx, int tag, int d,
                        output logic hit, output logic evict);
    @(negedge clk);
    up_valid = 1; up_op = op; up_index = SET_BITS'(idx);
    up_tag = TAG_BITS'(tag); up_dist = DIST_BITS'(d);
    #1; hit = up_hit; evict = up_evict;
    @(negedge clk);
    up_valid = 0;
  endtask

  // lookup; result is checked one cycle after the request
  task automatic lookup(int idx, int tag, output logic hit, output int d);
    @(negedge clk);
    lk_valid = 1; lk_index = SET_BITS'(idx); lk_tag = TAG_BITS'(tag);
    @(negedge clk);
    lk_valid = 0;
    hit = lk_hit; d = int'(lk_dist);
  endtask

  logic h, e;
  int   d;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // empty table predicts nothing
    lookup(5, 16'h1234, h, d);
    check("empty miss", h, 0);
    // allocate and find
    update(UPD_ALLOC, 5, 16'h1234, 17, h, e);
    check("alloc no tag hit", h, 0);
    check("alloc into free way", e, 0);
    lookup(5, 16'h1234, h, d);
    check("hit after alloc", h, 1);
    check("distance", d, 17);
    lookup(6, 16'h1234, h, d);
    check("other set misses", h, 0);
    lookup(5, 16'h1235, h, d);
    check("other tag misses", h, 0);
    // re-allocating the same tag overwrites the distance
    update(UPD_ALLOC, 5, 16'h1234, 3, h, e);
    check("realloc tag hit", h, 1);
    lookup(5, 16'h1234, h, d);
    check("overwritten distance", d, 3);
    // 15 failures bring the 4-bit confidence from 15 to 0
    for (int i = 0; i < 14; i++) update(UPD_CONF_FAIL, 5, 16'h1234, 0, h, e);
    lookup(5, 16'h1234, h, d);
    check("conf 1 still predicts", h, 1);
    update(UPD_CONF_FAIL, 5, 16'h1234, 0, h, e);
    lookup(5, 16'h1234, h, d);
    check("conf 0 stops predicting", h, 0);
    // a confirmed prediction restores confidence
    update(UPD_CONF_OK, 5, 16'h1234, 0, h, e);
    lookup(5, 16'h1234, h, d);
    check("conf reset to max", h, 1);
    for (int i = 0; i < 14; i++) update(UPD_CONF_FAIL, 5, 16'h1234, 0, h, e);
    lookup(5, 16'h1234, h, d);
    check("max is 15 after reset", h, 1);
    update(UPD_CONF_OK, 5, 16'h1234, 0, h, e);
    // fill set 9 with tags 1..4, then touch tag 1 so tag 2 is LRU
    for (int t = 1; t <= 4; t++) begin
      update(UPD_ALLOC, 9, t, t, h, e);
      check("fill without eviction", e, 0);
    end
    update(UPD_CONF_OK, 9, 1, 0, h, e);
    update(UPD_ALLOC, 9, 5, 55, h, e);
    check("fifth tag evicts", e, 1);
    lookup(9, 2, h, d);
    check("LRU tag 2 gone", h, 0);
    for (int t = 1; t <= 5; t++) if (t != 2) begin
      lookup(9, t, h, d);
      check("survivor hit", h, 1);
      check("survivor distance", d, t == 5 ? 55 : t);
    end
    // next victim is tag 3 (oldest touch)
    update(UPD_ALLOC, 9, 6, 66, h, e);
    lookup(9, 3, h, d);
    check("next LRU tag 3 gone", h, 0);
    lookup(9, 1, h, d);
    check("touched tag 1 kept", h, 1);
    // an empty (zero-confidence) way is preferred to the LRU way
    for (int i = 0; i < 15; i++) update(UPD_CONF_FAIL, 9, 5, 0, h, e);
    update(UPD_ALLOC, 9, 7, 77, h, e);
    check("zero-confidence way reused", e, 0);
    lookup(9, 4, h, d);
    check("LRU kept when a way is free", h, 1);
    lookup(9, 7, h, d);
    check("new tag in freed way", d, 77);
    // pipelined lookups, one per cycle
    @(negedge clk);
    lk_valid = 1; lk_index = 9; lk_tag = 7;
    @(negedge clk);
    lk_tag = 4;
    check("pipelined 1", {lk_hit, 8'(lk_dist)}, {1'b1, 8'd77});
    @(negedge clk);
    lk_valid = 0;
    check("pipelined 2", {lk_hit, 8'(lk_dist)}, {1'b1, 8'd4});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
