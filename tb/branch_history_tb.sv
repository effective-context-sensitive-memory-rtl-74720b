// branch_history_tb: decode-side history with random branches and random
// recoveries (rewinding to an earlier branch, with or without a corrected
// outcome). A reference keeps the full list of in-flight branches; after
// every cycle the counter and all 32 window slots are compared with it.
// The counter is narrowed to 8 bits so that it wraps many times.
module branch_history_tb;
  import phast_pkg::*;
  localparam int CB = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, recoveries = 0;

  logic          br_valid = 0, rec_valid = 0, rec_write = 0;
  hist_entry_t   br_entry = '0, rec_entry = '0;
  logic [CB-1:0] rec_count = '0;
  logic [CB-1:0] br_count;
  hist_window_t  window;

  branch_history #(.CNT_BITS(CB)) dut (.*);

  hist_entry_t model [$];   // every branch ever kept, oldest first
  int unsigned dropped = 0; // oldest branches removed from the model

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      int back;
      @(negedge clk);
      rec_valid = ($urandom % 20) == 0 && model.size() > 0;
      back      = 0;
      if (rec_valid) begin
        // rewind over at most 20 of the youngest branches
        back      = 1 + int'($urandom % 20);
        if (back > model.size()) back = model.size();
        rec_write = $urandom % 2;
        rec_entry = hist_entry_t'($urandom);
        rec_count = CB'(dropped + model.size() - back);
      end
      br_valid = !rec_valid && ($urandom % 4) != 0;
      br_entry = hist_entry_t'($urandom);
      @(posedge clk);
      if (rec_valid) begin
        recoveries++;
        repeat (back) void'(model.pop_back());
        if (rec_write) model.push_back(rec_entry);
      end else if (br_valid) begin
        model.push_back(br_entry);
      end
      #1;
      checks++;
      if (br_count !== CB'(dropped + model.size())) begin
        failures++;
        $display("FAIL count %0d vs %0d", br_count, dropped + model.size());
      end
      for (int i = 0; i < MAX_HIST; i++) begin
        hist_entry_t exp;
        exp = (i < model.size()) ? model[model.size() - 1 - i] : '0;
        checks++;
        if (window[i] !== exp) begin
          failures++;
          $display("FAIL it %0d slot %0d: %h vs %h", it, i, window[i], exp);
        end
      end
      // keep the in-flight span below the buffer size
      while (model.size() > 150) begin
        void'(model.pop_front());
        dropped++;
      end
    end
    checks++;
    if (recoveries < 10 || dropped < 600) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
