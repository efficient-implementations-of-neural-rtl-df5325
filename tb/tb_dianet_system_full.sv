// tb_dianet_system_full: end-to-end testbench of the design at its default
// size: a 20 x 20 PE array with 16-word input and output FIFOs, the 1152-input
// PIF neuron and the LIF PE. It configures the array with four DiaNets through
// the scan chain, runs them from external memory and checks every PE output,
// the written-back words and the labels (see dianet_system_tb_body.svh).
// Output write-back stalls cannot occur here because the output FIFO is
// deeper than the number of output neurons; tb_dianet_system covers them.
module tb_dianet_system_full;
  localparam bit OUT_FIFO_SMALL = 0;
  localparam int MEM_GNT_PCT = 60;
  localparam bit HAS_NEURONS = 1;
`define DUT_ACC dut.u_accel
`include "dianet_system_tb_body.svh"

  dianet_system dut (.*);
endmodule
