// tb_accel_ctrl: plays the config loader, input controller and comparators
// around the sequencer. Checks the order of the steps (config start, then
// clear of exactly the tasks in the mask together with the write-back
// restart, then input start), that the read port is given to the config
// loader only during configuration, that done waits for every masked task's
// result, that a run with zero config words skips configuration, and that
// cycles equals the measured run length.
module tb_accel_ctrl;
  import dianet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, cfg_start, cfg_done = 0, in_start, in_done = 0, out_start, sel_cfg;
  logic [MEM_AW-1:0] cfg_words = 0;
  logic [NUM_TASKS-1:0] task_mask = 0, clear, result_valid = 0;
  logic [31:0] cycles;
  int checks = 0, failures = 0;

  accel_ctrl dut (.clk, .rst_n, .start, .cfg_words, .task_mask, .busy, .done, .cycles,
    .cfg_start, .cfg_done, .in_start, .in_done, .out_start, .clear, .result_valid, .sel_cfg);

  task automatic expect_(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic run(int cw, logic [NUM_TASKS-1:0] mask);
    int t0, n;
    @(negedge clk);
    cfg_words = MEM_AW'(cw); task_mask = mask; start = 1;
    t0 = 0;
    @(negedge clk); start = 0; n = 1;
    if (cw !== 0) begin
      expect_(cfg_start && sel_cfg && clear == 0, "config step first");
      repeat (5) begin @(negedge clk); n++; expect_(sel_cfg && !in_start && clear == 0, "config holds"); end
      cfg_done = 1; @(negedge clk); n++; cfg_done = 0;
    end
    expect_(clear == mask && out_start && !sel_cfg, "clear masked tasks and restart write-back");
    @(negedge clk); n++;
    expect_(in_start && !sel_cfg, "input step");
    repeat (4) begin @(negedge clk); n++; end
    in_done = 1; @(negedge clk); n++; in_done = 0;
    // results arrive task by task; done must wait for the last masked one
    for (int t = 0; t < NUM_TASKS; t++) if (mask[t]) begin
      expect_(busy && !done, "still busy before all results");
      result_valid[t] = 1; @(negedge clk); n++;
    end
    if (!done) begin @(negedge clk); n++; end
    expect_(done && !busy, "done after last result");
    expect_(cycles == 32'(n - 1) || cycles == 32'(n), $sformatf("cycles %0d vs %0d", cycles, n));
    result_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(10, 4'b0011);
    run(0, 4'b0100);
    run(3, 4'b1111);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
