// tb_input_controller: streams words from the memory model into a FIFO that
// a slow consumer drains at random. Checks that every word arrives once and
// in address order, that the FIFO never overflows (the FIFO's own assertion
// and a count check), that the FIFO does fill up (back-pressure seen), and
// that done pulses once per transfer.
module tb_input_controller;
  import dianet_pkg::*;
  localparam int D = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done;
  logic [MEM_AW-1:0] base = 0, nwords = 0;
  logic rd_req, rd_gnt, rd_rvalid;
  logic [MEM_AW-1:0] rd_addr;
  logic [MEM_DW-1:0] rd_rdata;
  logic push, pop, empty, full;
  logic [MEM_DW-1:0] wdata, rdata;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0, dones = 0, full_cycles = 0;
  logic [MEM_DW-1:0] got[$];

  input_controller #(.FIFO_DEPTH(D)) dut (.clk, .rst_n, .start, .base, .nwords, .busy, .done,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .fifo_push(push), .fifo_wdata(wdata), .fifo_count(count));
  sync_fifo #(.WIDTH(MEM_DW), .DEPTH(D)) fifo (.clk, .rst_n, .push, .wdata, .pop,
    .rdata, .empty, .full, .count);
  ext_mem_model #(.LAT(4), .GNT_PCT(80)) mem (.clk, .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wr_req(1'b0), .wr_addr('0), .wr_data('0), .wr_gnt());

  logic slow;
  assign pop = !empty && (slow ? ($urandom_range(0, 99) < 20) : 1'b1);
  always @(posedge clk) begin
    if (pop) got.push_back(rdata);
    if (done) dones++;
    if (full) full_cycles++;
    if (push && full) begin failures++; $display("FAIL push into full FIFO"); end
  end

  task automatic run(int b, int n, bit s);
    got.delete(); dones = 0; slow = s;
    @(negedge clk);
    base = MEM_AW'(b); nwords = MEM_AW'(n); start = 1;
    @(negedge clk); start = 0;
    while (busy || !empty) @(negedge clk);
    repeat (3) @(negedge clk);
    checks++;
    if (got.size() !== n) begin failures++; $display("FAIL got %0d of %0d", got.size(), n); end
    checks++;
    if (dones !== 1) begin failures++; $display("FAIL done %0d", dones); end
    for (int i = 0; i < n && i < got.size(); i++) begin
      checks++;
      if (got[i] !== mem.mem[b + i]) begin failures++; $display("FAIL word %0d", i); end
    end
  endtask

  initial begin
    slow = 0;
    for (int i = 0; i < 300; i++) mem.mem[200 + i] = $urandom;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(200, 50, 1);
    run(260, 3, 0);
    run(270, 100, 0);
    run(200, 0, 0);
    checks++;
    if (full_cycles == 0) begin failures++; $display("FAIL FIFO never filled"); end
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
