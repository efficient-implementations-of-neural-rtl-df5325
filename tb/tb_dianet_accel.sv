// tb_dianet_accel: end-to-end testbench of the accelerator alone
// (dianet_accel) with a 20 x 20 array and shallow FIFOs (2 words each), so
// that input credit back-pressure and output write-back stalls occur. It
// configures four DiaNets through the scan chain, runs them from the memory
// model three times (full configuration, inputs only for two tasks, new
// configuration) and checks every PE output, the written-back words, the
// labels and the cycle count (see dianet_system_tb_body.svh).
module tb_dianet_accel;
  localparam bit OUT_FIFO_SMALL = 1;
  localparam int MEM_GNT_PCT = 30;
  localparam bit HAS_NEURONS = 0;
`define DUT_ACC dut
`include "dianet_system_tb_body.svh"

  dianet_accel #(.IN_FIFO_DEPTH(2), .OUT_FIFO_DEPTH(2)) dut (
    .clk, .rst_n, .start, .cfg_base, .cfg_words, .in_base, .in_words, .out_base,
    .task_mask, .task_labels, .busy, .done, .cycles,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wr_req, .wr_addr, .wr_data, .wr_gnt,
    .result_valid, .result_label, .result_value,
    .routed, .dropped, .out_stall_cycles, .written, .cfg_so);
endmodule
