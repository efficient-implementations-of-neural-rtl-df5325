// argmax_unit: the comparators that turn the output values of each task into
// a class label.
//
// Output words of all tasks arrive one per cycle at most (in_valid with
// dianet_pkg::out_word_t). For each task the unit keeps the largest value seen
// so far and its label; a strictly larger value replaces it, so on a tie the
// earlier output wins. When the number of outputs seen for a task reaches
// that task's labels[t], the task's result_label is final and result_valid[t]
// rises, one cycle after the last output. clear[t] restarts task t. The
// per-task label count and the tie rule are this design's choices.
module argmax_unit
  import dianet_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic [NUM_TASKS-1:0]             clear,
  input  logic [NUM_TASKS-1:0][LABEL_W:0]  labels,
  input  logic                             in_valid,
  input  logic [MEM_DW-1:0]                in_word,
  output logic [NUM_TASKS-1:0]             result_valid,
  output logic [NUM_TASKS-1:0][LABEL_W-1:0] result_label,
  output data_t [NUM_TASKS-1:0]            result_value
);

  out_word_t w;
  assign w = out_word_t'(in_word);

  logic [NUM_TASKS-1:0][LABEL_W:0] seen;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seen         <= '0;
      result_valid <= '0;
      result_label <= '0;
      result_value <= '0;
    end else begin
      for (int t = 0; t < NUM_TASKS; t++) begin
        if (clear[t]) begin
          seen[t]         <= '0;
          result_valid[t] <= 1'b0;
          result_label[t] <= '0;
          result_value[t] <= '0;
        end else if (in_valid && w.task_id == TASK_W'(t) && !result_valid[t]) begin
          seen[t] <= seen[t] + 1'b1;
          if (seen[t] == '0 || w.data > result_value[t]) begin
            result_value[t] <= w.data;
            result_label[t] <= w.label;
          end
          if (seen[t] + 1'b1 == labels[t]) result_valid[t] <= 1'b1;
        end
      end
    end
  end

endmodule
