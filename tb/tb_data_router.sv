// tb_data_router: feeds input words, some addressed outside the array, and
// checks that each in-range word produces exactly one write strobe, at the
// right PE and with the right value, in the cycle after it was popped, that
// out-of-range words produce none, and the routed/dropped counters.
module tb_data_router;
  import dianet_pkg::*;
  localparam int R = 4, C = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [MEM_DW-1:0] fifo_rdata = 0;
  logic fifo_empty = 1, fifo_pop;
  logic [R*C-1:0] x_we;
  data_t x_data;
  logic [15:0] dropped, routed;
  int checks = 0, failures = 0, exp_routed = 0, exp_dropped = 0;

  data_router #(.ROWS(R), .COLS(C)) dut (.clk, .rst_n, .fifo_rdata, .fifo_empty, .fifo_pop,
    .x_we, .x_data, .dropped, .routed);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 300; i++) begin
      in_word_t w;
      bit gap, inr;
      w = '0;
      w.row = 5'($urandom_range(0, R + 1));
      w.col = 5'($urandom_range(0, C + 1));
      w.data = data_t'($urandom);
      gap = ($urandom_range(0, 3) == 0);
      inr = (w.row < R) && (w.col < C);
      @(negedge clk);
      fifo_rdata = MEM_DW'(w);
      fifo_empty = gap;
      #1;
      checks++;
      if (fifo_pop !== !gap) begin failures++; $display("FAIL pop=%0b empty=%0b", fifo_pop, gap); end
      @(negedge clk);
      fifo_empty = 1;
      checks++;
      if (!gap && inr) begin
        exp_routed++;
        if (x_we !== (R*C)'(1) << (w.row * C + w.col) || x_data !== w.data) begin
          failures++; $display("FAIL route r=%0d c=%0d we=%h", w.row, w.col, x_we);
        end
      end else begin
        if (!gap) exp_dropped++;
        if (x_we !== 0) begin failures++; $display("FAIL spurious strobe %h", x_we); end
      end
    end
    checks++;
    if (routed !== 16'(exp_routed) || dropped !== 16'(exp_dropped)) begin
      failures++; $display("FAIL counters %0d/%0d exp %0d/%0d", routed, dropped, exp_routed, exp_dropped);
    end
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
