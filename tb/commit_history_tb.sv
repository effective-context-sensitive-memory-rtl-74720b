// commit_history_tb: random committed branches against a reference queue;
// checks every window slot after every cycle and that the window holds
// when no branch commits.
module commit_history_tb;
  import phast_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         cb_valid = 0;
  hist_entry_t  cb_entry = '0;
  hist_window_t window;
  hist_entry_t  model [$];

  commit_history dut (.*);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TIMEOUT");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < MAX_HIST; i++) model.push_front('0);
    for (int it = 0; it < 1000; it++) begin
      @(negedge clk);
      cb_valid = ($urandom % 3) != 0;
      cb_entry = hist_entry_t'($urandom);
      @(posedge clk);
      if (cb_valid) begin
        model.push_front(cb_entry);
        void'(model.pop_back());
      end
      #1;
      for (int i = 0; i < MAX_HIST; i++) begin
        checks++;
        if (window[i] !== model[i]) begin
          failures++;
          $display("FAIL it %0d slot %0d: %h vs %h", it, i, window[i], model[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
