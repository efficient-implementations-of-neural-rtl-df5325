// tb_output_controller: words pushed into an output FIFO at random are
// drained through the write port of the memory model, which grants at
// random. Checks every word lands at consecutive addresses from the base, in
// order, that each is handed to the comparators exactly once with the same
// value, and the written counter; a second start restarts at a new base.
module tb_output_controller;
  import dianet_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0;
  logic [MEM_AW-1:0] base = 0, wr_addr, written;
  logic push = 0, pop, empty, full;
  logic [MEM_DW-1:0] wdata = 0, rdata, wr_data, cmp_word;
  logic [4:0] count;
  logic wr_req, wr_gnt, cmp_valid;
  int checks = 0, failures = 0;
  logic [MEM_DW-1:0] sent[$], cmp[$];

  sync_fifo #(.WIDTH(MEM_DW), .DEPTH(16)) fifo (.clk, .rst_n, .push, .wdata, .pop, .rdata, .empty, .full, .count);
  output_controller dut (.clk, .rst_n, .start, .base, .fifo_rdata(rdata), .fifo_empty(empty),
    .fifo_pop(pop), .wr_req, .wr_addr, .wr_data, .wr_gnt, .cmp_valid, .cmp_word, .written);
  ext_mem_model #(.GNT_PCT(50)) mem (.clk, .rd_req(1'b0), .rd_addr('0), .rd_gnt(), .rd_rvalid(), .rd_rdata(),
    .wr_req, .wr_addr, .wr_data, .wr_gnt);

  always @(posedge clk) if (cmp_valid) cmp.push_back(cmp_word);

  task automatic run(int b, int n);
    sent.delete(); cmp.delete();
    @(negedge clk); base = MEM_AW'(b); start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < n; i++) begin
      while (full || $urandom_range(0, 1)) @(negedge clk);
      push = 1; wdata = $urandom; sent.push_back(wdata);
      @(negedge clk); push = 0;
    end
    while (!empty) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (written !== MEM_AW'(n) || cmp.size() !== n) begin
      failures++; $display("FAIL written=%0d cmp=%0d exp %0d", written, cmp.size(), n);
    end
    for (int i = 0; i < n; i++) begin
      checks++;
      if (mem.mem[b + i] !== sent[i] || (i < cmp.size() && cmp[i] !== sent[i])) begin
        failures++; $display("FAIL word %0d", i);
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(1000, 40);
    run(2000, 7);
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
