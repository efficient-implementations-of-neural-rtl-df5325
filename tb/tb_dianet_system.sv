// tb_dianet_system: end-to-end testbench of the whole design with shallow
// FIFOs (input FIFO 2 words, output FIFO 2 words), so that input
// credit back-pressure and output write-back stalls both occur. The 20 x 20 array
// and everything else keep their default sizes. The test sequence, reference
// checks and mechanism counts are in dianet_system_tb_body.svh.
module tb_dianet_system;
  localparam bit OUT_FIFO_SMALL = 1;
  localparam int MEM_GNT_PCT = 30;
  localparam bit HAS_NEURONS = 1;
`define DUT_ACC dut.u_accel
`include "dianet_system_tb_body.svh"

  dianet_system #(.IN_FIFO_DEPTH(2), .OUT_FIFO_DEPTH(2)) dut (.*);
endmodule
