// tb_output_channel: output neurons of two tasks become valid at random
// times while the FIFO is randomly full. Checks that each output neuron's
// word {task, label, value} is pushed exactly once, that non-output or
// disabled PEs are never sent, that the lowest requesting index wins, that a
// full FIFO stalls the channel (and is counted), and that clearing one task
// lets its neurons be sent again while the other task's are not resent.
module tb_output_channel;
  import dianet_pkg::*;
  localparam int N = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NUM_TASKS-1:0] clear = 0;
  data_t   [N-1:0] z;
  logic    [N-1:0] z_valid;
  pe_cfg_t [N-1:0] cfg;
  logic fifo_push, fifo_full;
  logic [MEM_DW-1:0] fifo_wdata;
  logic [15:0] stall_cycles;
  int checks = 0, failures = 0, sent_cnt[N], stalls_seen = 0;
  bit model_sent[N];

  output_channel #(.N(N)) dut (.clk, .rst_n, .clear, .z, .z_valid, .cfg,
    .fifo_push, .fifo_wdata, .fifo_full, .stall_cycles);

  always @(posedge clk) if (rst_n && fifo_push) begin
    out_word_t w;
    int idx;
    w = out_word_t'(fifo_wdata);
    idx = -1;
    for (int i = N - 1; i >= 0; i--)
      if (cfg[i].en && cfg[i].is_out && z_valid[i] && !model_sent[i] && !clear[cfg[i].task_id]) idx = i;
    checks++;
    if (idx < 0) begin failures++; $display("FAIL push with no pending neuron"); end
    else begin
      if (w.label !== cfg[idx].label || w.task_id !== cfg[idx].task_id || w.data !== z[idx]) begin
        failures++; $display("FAIL word for PE %0d", idx);
      end
      sent_cnt[idx]++;
      model_sent[idx] = 1;
    end
  end

  task automatic phase(bit clear_t0_only);
    for (int cyc = 0; cyc < 60; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < N; i++)
        if (!z_valid[i] && $urandom_range(0, 9) == 0) z_valid[i] = 1;
      fifo_full = ($urandom_range(0, 2) == 0);
      #1;
      if (fifo_full && !fifo_push && |(z_valid)) stalls_seen++;
    end
    fifo_full = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    z_valid = '0; fifo_full = 0;
    for (int i = 0; i < N; i++) begin
      cfg[i] = '0;
      cfg[i].en = (i !== 7);
      cfg[i].is_out = (i % 3 !== 1);
      cfg[i].task_id = TASK_W'(i % 2);
      cfg[i].label = LABEL_W'(i);
      z[i] = data_t'($urandom);
      sent_cnt[i] = 0;
      model_sent[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1;
    phase(0);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (sent_cnt[i] !== ((cfg[i].en && cfg[i].is_out) ? 1 : 0)) begin
        failures++; $display("FAIL PE %0d sent %0d times", i, sent_cnt[i]);
      end
    end
    // clear task 0 only, and let its neurons become valid again
    @(negedge clk);
    clear = 1; for (int i = 0; i < N; i++) if (cfg[i].task_id == 0) begin z_valid[i] = 0; model_sent[i] = 0; end
    @(negedge clk);
    clear = 0;
    phase(1);
    for (int i = 0; i < N; i++) begin
      int exp;
      exp = (cfg[i].en && cfg[i].is_out) ? ((cfg[i].task_id == 0) ? 2 : 1) : 0;
      checks++;
      if (sent_cnt[i] !== exp) begin failures++; $display("FAIL after clear PE %0d sent %0d exp %0d", i, sent_cnt[i], exp); end
    end
    checks++;
    if (stall_cycles == 0 || stalls_seen == 0) begin failures++; $display("FAIL no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
