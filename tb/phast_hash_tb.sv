// phast_hash_tb: checks the index/tag hash of the 0-, 8- and 32-branch
// tables against a reference that builds the history as a bit string and
// folds it 23 bits at a time, plus the path properties the hash must have:
// branches beyond the table's length and destinations of non-oldest
// conditional branches do not matter; the oldest branch's destination does.
module phast_hash_tb;
  import phast_pkg::*;

  int checks = 0, failures = 0;
  logic [PC_BITS-1:0] pc;
  hist_window_t       win, win2;
  logic [SET_BITS-1:0] idx0, idx8, idx32, idx8b;
  logic [TAG_BITS-1:0] tag0, tag8, tag32, tag8b;

  phast_hash #(.HLEN(0))  u0  (.pc, .window(win),  .index(idx0),  .tag(tag0));
  phast_hash #(.HLEN(8))  u8  (.pc, .window(win),  .index(idx8),  .tag(tag8));
  phast_hash #(.HLEN(32)) u32 (.pc, .window(win),  .index(idx32), .tag(tag32));
  phast_hash #(.HLEN(8))  u8b (.pc, .window(win2), .index(idx8b), .tag(tag8b));

  // reference: history string, then fold in 23-bit chunks
  function automatic logic [22:0] ref_fold(hist_window_t w, int n);
    logic [32*7-1:0] s;
    logic [22:0] f;
    s = '0;
    for (int i = 0; i < n; i++) begin
      logic [6:0] slot;
      slot = {w[i].indirect, w[i].taken, w[i].dest};
      if (i < n - 1 && !w[i].indirect) slot[4:0] = 5'd0;
      s = s | ((32*7)'(slot) << (7 * i));
    end
    f = '0;
    for (int c = 0; c < 10; c++) f = f ^ 23'(s >> (23 * c));
    return f;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 300; it++) begin
      logic [PC_BITS-1:0] hi, hj;
      logic [22:0] f;
      pc = {$urandom, $urandom};
      for (int i = 0; i < MAX_HIST; i++) win[i] = hist_entry_t'($urandom);
      win2 = win;
      #1;
      hi = pc ^ (pc >> 2) ^ (pc >> 5);
      hj = pc ^ (pc >> 3) ^ (pc >> 7);
      check("idx0", 32'(idx0), 32'(hi[6:0]));
      check("tag0", 32'(tag0), 32'(hj[15:0]));
      f = ref_fold(win, 8);
      check("idx8", 32'(idx8), 32'(hi[6:0] ^ f[6:0]));
      check("tag8", 32'(tag8), 32'(hj[15:0] ^ f[22:7]));
      f = ref_fold(win, 32);
      check("idx32", 32'(idx32), 32'(hi[6:0] ^ f[6:0]));
      check("tag32", 32'(tag32), 32'(hj[15:0] ^ f[22:7]));
      // branch 9 and later are outside the 8-branch path
      win2[8] = ~win[8];
      win2[20] = ~win[20];
      // a conditional non-oldest branch: its destination bits do not count
      win2[3].indirect = 1'b0; win[3].indirect = 1'b0;
      win2[3].dest = ~win[3].dest;
      #1;
      check("beyond/cond dest ignored", {idx8b, tag8b}, {idx8, tag8});
      // the oldest branch's destination counts
      win2[7].dest = ~win[7].dest;
      #1;
      checks++;
      if ({idx8b, tag8b} == {idx8, tag8}) begin
        failures++; $display("FAIL oldest destination ignored");
      end
      // an indirect branch's destination counts
      win2 = win; win2[2].indirect = 1'b1; win[2].indirect = 1'b1;
      win2[2].dest = ~win[2].dest;
      #1;
      checks++;
      if ({idx8b, tag8b} == {idx8, tag8}) begin
        failures++; $display("FAIL indirect destination ignored");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
