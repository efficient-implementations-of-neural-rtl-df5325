// tb_argmax_unit: random output values for two interleaved tasks with
// different label counts. Checks each task's winning label and value against
// a reference maximum (ties go to the earlier output), that result_valid
// rises exactly after the last output of the task and not before, and that
// clear restarts one task.
module tb_argmax_unit;
  import dianet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NUM_TASKS-1:0] clear = 0;
  logic [NUM_TASKS-1:0][LABEL_W:0] labels;
  logic in_valid = 0;
  logic [MEM_DW-1:0] in_word = 0;
  logic [NUM_TASKS-1:0] result_valid;
  logic [NUM_TASKS-1:0][LABEL_W-1:0] result_label;
  data_t [NUM_TASKS-1:0] result_value;
  int checks = 0, failures = 0;

  argmax_unit dut (.clk, .rst_n, .clear, .labels, .in_valid, .in_word,
    .result_valid, .result_label, .result_value);

  task automatic round(int nl0, int nl1, bit ties);
    int seen[2], best_l[2];
    data_t best_v[2];
    labels = '0; labels[0] = (LABEL_W+1)'(nl0); labels[1] = (LABEL_W+1)'(nl1);
    @(negedge clk); clear = '1; @(negedge clk); clear = '0;
    seen = '{0, 0};
    while (seen[0] < nl0 || seen[1] < nl1) begin
      int t;
      out_word_t w;
      t = (seen[0] < nl0 && (seen[1] >= nl1 || $urandom_range(0, 1))) ? 0 : 1;
      w = '0;
      w.task_id = TASK_W'(t);
      w.label = LABEL_W'(seen[t]);
      w.data = ties ? data_t'($urandom_range(0, 3)) : data_t'($urandom);
      if (seen[t] == 0 || w.data > best_v[t]) begin best_v[t] = w.data; best_l[t] = seen[t]; end
      seen[t]++;
      checks++;
      if (result_valid[t]) begin failures++; $display("FAIL task %0d valid early", t); end
      in_valid = ($urandom_range(0, 3) !== 0);
      in_word = MEM_DW'(w);
      while (!in_valid) begin
        @(negedge clk);
        in_valid = 1;
      end
      @(negedge clk);
      in_valid = 0;
    end
    @(negedge clk);
    for (int t = 0; t < 2; t++) begin
      checks++;
      if (!result_valid[t] || result_label[t] !== LABEL_W'(best_l[t]) || result_value[t] !== best_v[t]) begin
        failures++;
        $display("FAIL task %0d: valid=%0b label=%0d exp %0d", t, result_valid[t], result_label[t], best_l[t]);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 100; r++)
      round($urandom_range(1, 16), $urandom_range(1, 16), r % 3 == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
