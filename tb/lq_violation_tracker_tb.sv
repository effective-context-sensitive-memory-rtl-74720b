// lq_violation_tracker_tb: the four two-store scenarios of a load and two
// older stores to the same address, plus filtering details:
//   (a) stores resolved before the load executes: no violation;
//   (b) load forwarded by the older store, younger store resolves late:
//       violation recorded against the younger store;
//   (c) load forwarded by the younger store, older store resolves late:
//       the match is ignored (forwarding filter);
//   (d) load overtakes both: whichever order they resolve in, the younger
//       store is the recorded violator (also when both search in the same
//       cycle on the two store ports);
// and non-overlapping bytes, stores younger than the load, flushes of
// younger loads and reallocation. Then a random test against a reference.
module lq_violation_tracker_tb;
  import phast_pkg::*;
  localparam int LQ = 192, SQ = 114, P = 2, AB = 61;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic al_valid = 0; logic [7:0] al_idx = '0; logic [SEQ_BITS-1:0] al_seq = '0;
  logic ex_valid = 0; logic [7:0] ex_idx = '0; logic [AB-1:0] ex_addr = '0;
  logic [7:0] ex_mask = '0; logic ex_fwd_valid = 0;
  logic [SEQ_BITS-1:0] ex_fwd_seq = '0; logic [6:0] ex_fwd_sq = '0;
  logic st_valid [P]; logic [SEQ_BITS-1:0] st_seq [P]; logic [AB-1:0] st_addr [P];
  logic [7:0] st_mask [P]; logic [BRCNT_BITS-1:0] st_brcnt [P]; logic [6:0] st_sq [P];
  logic fl_valid = 0; logic [SEQ_BITS-1:0] fl_seq = '0;
  logic cm_valid = 0; logic [7:0] cm_idx = '0;
  logic cm_violated; logic [BRCNT_BITS-1:0] cm_viol_brcnt; logic [6:0] cm_viol_sq;
  logic cm_fwd_valid; logic [6:0] cm_fwd_sq;
  logic ev_violation, ev_filtered, ev_replaced;

  lq_violation_tracker dut (.*);

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

  task automatic idle();
    for (int p = 0; p < P; p++) st_valid[p] = 0;
    al_valid = 0; ex_valid = 0; fl_valid = 0; cm_valid = 0;
  endtask

  task automatic alloc(int idx, int seq);
    @(negedge clk); idle();
    al_valid = 1; al_idx = 8'(idx); al_seq = SEQ_BITS'(seq);
    @(negedge clk); idle();
  endtask

  task automatic exec(int idx, logic [AB-1:0] a, logic [7:0] m, logic fwd, int fseq, int fsq);
    @(negedge clk); idle();
    ex_valid = 1; ex_idx = 8'(idx); ex_addr = a; ex_mask = m;
    ex_fwd_valid = fwd; ex_fwd_seq = SEQ_BITS'(fseq); ex_fwd_sq = 7'(fsq);
    @(negedge clk); idle();
  endtask

  task automatic store(int p, int seq, logic [AB-1:0] a, logic [7:0] m, int brc, int sq);
    st_valid[p] = 1; st_seq[p] = SEQ_BITS'(seq); st_addr[p] = a; st_mask[p] = m;
    st_brcnt[p] = BRCNT_BITS'(brc); st_sq[p] = 7'(sq);
  endtask

  task automatic store1(int seq, logic [AB-1:0] a, logic [7:0] m, int brc, int sq,
                        output logic viol, output logic filt, output logic repl);
    @(negedge clk); idle();
    store(0, seq, a, m, brc, sq);
    #1; viol = ev_violation; filt = ev_filtered; repl = ev_replaced;
    @(negedge clk); idle();
  endtask

  task automatic commit(int idx, output logic v, output int brc, output int sq,
                        output logic fv, output int fsq);
    @(negedge clk); idle();
    cm_valid = 1; cm_idx = 8'(idx);
    #1; v = cm_violated; brc = int'(cm_viol_brcnt); sq = int'(cm_viol_sq);
    fv = cm_fwd_valid; fsq = int'(cm_fwd_sq);
    @(negedge clk); idle();
  endtask

  localparam logic [AB-1:0] A = 61'h1000, B = 61'h2000;
  logic v, f, r, fv; int brc, sq, fsq;

  // reference model for the random test
  typedef struct {
    bit valid, exec, fwd, viol;
    int seq, fseq, vseq, vbrc, vsq, fsq;
    logic [AB-1:0] addr; logic [7:0] mask;
  } ref_t;
  ref_t rf [LQ];

  initial begin
    idle();
    repeat (2) @(posedge clk);
    rst_n = 1;
    // stores S1 (seq 10, sq 4, brcnt 100) and S2 (seq 20, sq 5, brcnt 103);
    // load seq 30 in LQ slot 7
    // (a) both stores resolve before the load executes
    alloc(7, 30);
    store1(10, A, 8'hff, 100, 4, v, f, r);
    store1(20, A, 8'hff, 103, 5, v, f, r);
    exec(7, A, 8'h0f, 1, 20, 5);
    commit(7, v, brc, sq, fv, fsq);
    check("(a) no violation", v, 0);
    check("(a) forwarded from S2", {fv, 8'(fsq)}, {1'b1, 8'd5});
    // (b) load forwarded by S1, S2 resolves late
    alloc(7, 30);
    exec(7, A, 8'h0f, 1, 10, 4);
    store1(20, A, 8'hf0, 103, 5, v, f, r);
    check("(b) no overlap bytes", v, 0);
    store1(20, A, 8'h01, 103, 5, v, f, r);
    check("(b) violation event", v, 1);
    commit(7, v, brc, sq, fv, fsq);
    check("(b) violated", v, 1);
    check("(b) violator S2", {16'(brc), 8'(sq)}, {16'd103, 8'd5});
    // (c) load forwarded by S2, S1 resolves late: filtered
    alloc(7, 30);
    exec(7, A, 8'h0f, 1, 20, 5);
    store1(10, A, 8'h0f, 100, 4, v, f, r);
    check("(c) no violation event", v, 0);
    check("(c) filtered event", f, 1);
    commit(7, v, brc, sq, fv, fsq);
    check("(c) not violated", v, 0);
    // (d1) load overtakes both; S1 then S2 resolve
    alloc(7, 30);
    exec(7, A, 8'h0f, 0, 0, 0);
    store1(10, A, 8'h0f, 100, 4, v, f, r);
    check("(d1) first violation", v, 1);
    store1(20, A, 8'h0f, 103, 5, v, f, r);
    check("(d1) younger replaces", r, 1);
    commit(7, v, brc, sq, fv, fsq);
    check("(d1) violator S2", {v, 16'(brc), 8'(sq)}, {1'b1, 16'd103, 8'd5});
    // (d2) S2 then S1: S1 must not replace S2
    alloc(7, 30);
    exec(7, A, 8'h0f, 0, 0, 0);
    store1(20, A, 8'h0f, 103, 5, v, f, r);
    store1(10, A, 8'h0f, 100, 4, v, f, r);
    check("(d2) older does not replace", r, 0);
    commit(7, v, brc, sq, fv, fsq);
    check("(d2) violator S2", {v, 16'(brc), 8'(sq)}, {1'b1, 16'd103, 8'd5});
    // (d3) both on the two ports in the same cycle
    alloc(7, 30);
    exec(7, A, 8'h0f, 0, 0, 0);
    @(negedge clk); idle();
    store(0, 20, A, 8'h0f, 103, 5);
    store(1, 10, A, 8'h0f, 100, 4);
    @(negedge clk); idle();
    commit(7, v, brc, sq, fv, fsq);
    check("(d3) violator S2", {v, 16'(brc), 8'(sq)}, {1'b1, 16'd103, 8'd5});
    // a store younger than the load never violates; other address neither
    alloc(8, 30);
    exec(8, B, 8'hff, 0, 0, 0);
    store1(40, B, 8'hff, 110, 9, v, f, r);
    check("younger store ignored", v, 0);
    store1(20, A, 8'hff, 110, 9, v, f, r);
    check("other address ignored", v, 0);
    // flush of loads younger than seq 25 frees slot 8 (seq 30)
    @(negedge clk); idle(); fl_valid = 1; fl_seq = 25;
    @(negedge clk); idle();
    store1(20, B, 8'hff, 103, 5, v, f, r);
    check("flushed load not searched", v, 0);

    // ---- random test against the reference ----
    @(negedge clk); idle(); rst_n = 0;
    @(negedge clk); rst_n = 1;
    foreach (rf[i]) rf[i] = '{default: 0};
    for (int it = 0; it < 3000; it++) begin
      int li;
      @(negedge clk); idle();
      li = int'($urandom % 16);
      case ($urandom % 4)
        0: begin al_valid = 1; al_idx = 8'(li); al_seq = SEQ_BITS'(1000 + $urandom % 200); end
        1: begin ex_valid = 1; ex_idx = 8'(li); ex_addr = AB'($urandom % 4);
                 ex_mask = 8'($urandom); ex_fwd_valid = $urandom % 2;
                 ex_fwd_seq = SEQ_BITS'(1000 + $urandom % 200); ex_fwd_sq = 7'($urandom % SQ); end
        default: ;
      endcase
      for (int p = 0; p < P; p++)
        if ($urandom % 2) store(p, 1000 + $urandom % 200, AB'($urandom % 4), 8'($urandom),
                                $urandom % 1024, $urandom % SQ);
      // reference next state
      begin
        ref_t nx [LQ];
        nx = rf;
        for (int i = 0; i < LQ; i++)
          for (int p = 0; p < P; p++)
            if (st_valid[p] && rf[i].valid && rf[i].exec && int'(st_seq[p]) < rf[i].seq
                && st_addr[p] == rf[i].addr && (st_mask[p] & rf[i].mask) != 0
                && !(rf[i].fwd && int'(st_seq[p]) < rf[i].fseq)
                && (!nx[i].viol || nx[i].vseq < int'(st_seq[p]))) begin
              nx[i].viol = 1; nx[i].vseq = int'(st_seq[p]);
              nx[i].vbrc = int'(st_brcnt[p]); nx[i].vsq = int'(st_sq[p]);
            end
        if (ex_valid) begin
          nx[ex_idx].exec = 1; nx[ex_idx].addr = ex_addr; nx[ex_idx].mask = ex_mask;
          nx[ex_idx].fwd = ex_fwd_valid; nx[ex_idx].fseq = int'(ex_fwd_seq);
          nx[ex_idx].fsq = int'(ex_fwd_sq); nx[ex_idx].viol = 0;
        end
        if (al_valid) begin
          nx[al_idx] = '{default: 0};
          nx[al_idx].valid = 1; nx[al_idx].seq = int'(al_seq);
        end
        @(negedge clk); idle();
        rf = nx;
      end
      // read back one random slot through the commit port without freeing
      // it: the commit happens in a cycle the reference also applies
      li = int'($urandom % 16);
      cm_valid = 1; cm_idx = 8'(li);
      #1;
      checks++;
      if (cm_violated !== (rf[li].valid && rf[li].viol)
          || (rf[li].valid && rf[li].viol
              && (int'(cm_viol_brcnt) != rf[li].vbrc || int'(cm_viol_sq) != rf[li].vsq))) begin
        failures++;
        $display("FAIL random it %0d slot %0d: %0d/%0d/%0d vs %0d/%0d/%0d", it, li,
                 cm_violated, cm_viol_brcnt, cm_viol_sq, rf[li].viol, rf[li].vbrc, rf[li].vsq);
      end
      rf[li].valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
