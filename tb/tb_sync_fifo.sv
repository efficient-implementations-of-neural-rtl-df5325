// tb_sync_fifo: random push/pop traffic against a queue reference model.
// Checks data order, the empty/full flags and count every cycle, and that
// the FIFO fills to exactly DEPTH words.
module tb_sync_fifo;
  localparam int W = 32, D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push = 0, pop = 0, empty, full;
  logic [W-1:0] wdata = 0, rdata;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, fulls = 0;
  logic [W-1:0] q[$];

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full, .count);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      int bias;
      bias = ((cyc / 500) % 2) ? 70 : 30;   // alternate fill and drain phases
      @(negedge clk);
      checks++;
      if (empty !== (q.size() == 0) || full !== (q.size() == D) || count !== q.size()) begin
        failures++;
        $display("FAIL flags: empty=%0b full=%0b count=%0d model=%0d", empty, full, count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (rdata !== q[0]) begin
          failures++;
          $display("FAIL data %h exp %h", rdata, q[0]);
        end
      end
      if (full) fulls++;
      push = !full && ($urandom_range(0, 99) < bias);
      pop  = !empty && ($urandom_range(0, 99) >= bias);
      wdata = $urandom;
      @(posedge clk);
      #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wdata);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("FAIL never full"); end
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
