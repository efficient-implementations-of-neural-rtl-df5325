// dianet_system: the three hardware pieces of this design side by side.
//
//   * u_accel (dianet_accel): the multi-grained reconfigurable DiaNet
//     accelerator, a 20 x 20 bisection PE array with its configuration scan
//     chain, input/output FIFOs, data router, write-back and label
//     comparators, attached to an external memory. This is the main design.
//   * u_pif (pif_neuron): a parametric integrate-and-fire neuron with ternary
//     weights and binary-ternary dot product, the building block of the
//     ternary spiking networks (TSNN).
//   * u_lif (lif_pe): a DiaNet PE with a leaky integrate-and-fire neuron, the
//     building block of the temporal-spatial combined network (DiaNet4.0).
//
// The three share only clock and reset; each has its own ports, prefixed
// pif_ and lif_ for the two neuron blocks. Their interfaces and timing are
// described in their own files. The array size and FIFO depths of the
// accelerator are parameters passed through.
module dianet_system
  import dianet_pkg::*;
#(
  parameter int unsigned ROWS           = 20,
  parameter int unsigned COLS           = 20,
  parameter int unsigned IN_FIFO_DEPTH  = 16,
  parameter int unsigned OUT_FIFO_DEPTH = 16,
  parameter int unsigned PIF_N_IN       = 1152,
  parameter int unsigned PIF_IN_W       = 2,
  parameter int unsigned PIF_U_W        = 24,
  parameter int unsigned PIF_TIMESTEPS  = 4,
  parameter int unsigned LIF_CNT_W      = 4,
  parameter int unsigned LIF_TIMESTEPS  = 8
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // ---- accelerator: command ----
  input  logic                              start,
  input  logic [MEM_AW-1:0]                 cfg_base,
  input  logic [MEM_AW-1:0]                 cfg_words,
  input  logic [MEM_AW-1:0]                 in_base,
  input  logic [MEM_AW-1:0]                 in_words,
  input  logic [MEM_AW-1:0]                 out_base,
  input  logic [NUM_TASKS-1:0]              task_mask,
  input  logic [NUM_TASKS-1:0][LABEL_W:0]   task_labels,
  output logic                              busy,
  output logic                              done,
  output logic [31:0]                       cycles,
  // ---- accelerator: external memory ----
  output logic                              rd_req,
  output logic [MEM_AW-1:0]                 rd_addr,
  input  logic                              rd_gnt,
  input  logic                              rd_rvalid,
  input  logic [MEM_DW-1:0]                 rd_rdata,
  output logic                              wr_req,
  output logic [MEM_AW-1:0]                 wr_addr,
  output logic [MEM_DW-1:0]                 wr_data,
  input  logic                              wr_gnt,
  // ---- accelerator: results and status ----
  output logic [NUM_TASKS-1:0]              result_valid,
  output logic [NUM_TASKS-1:0][LABEL_W-1:0] result_label,
  output data_t [NUM_TASKS-1:0]             result_value,
  output logic [15:0]                       routed,
  output logic [15:0]                       dropped,
  output logic [15:0]                       out_stall_cycles,
  output logic [MEM_AW-1:0]                 written,
  output logic                              cfg_so,
  // ---- TSNN PIF neuron ----
  input  logic                              pif_start,
  input  logic                              pif_step,
  input  logic                              pif_is_output,
  input  logic [PIF_N_IN-1:0][PIF_IN_W-1:0] pif_spikes_in,
  input  logic [PIF_N_IN-1:0]               pif_w_pos,
  input  logic [PIF_N_IN-1:0]               pif_w_neg,
  input  logic signed [PIF_U_W-1:0]         pif_vth,
  input  logic signed [PIF_U_W-1:0]         pif_bias,
  output logic                              pif_spike,
  output logic signed [PIF_U_W-1:0]         pif_u,
  output logic [$clog2(PIF_TIMESTEPS+1)-1:0] pif_t,
  output logic                              pif_done,
  // ---- DiaNet4.0 LIF PE ----
  input  logic                              lif_start,
  input  logic                              lif_step,
  input  logic                              lif_is_output,
  input  data_t                             lif_w0,
  input  data_t                             lif_w1,
  input  data_t                             lif_wx,
  input  data_t                             lif_bias,
  input  data_t                             lif_vth,
  input  logic [LIF_CNT_W-1:0]              lif_s0,
  input  logic [LIF_CNT_W-1:0]              lif_s1,
  input  logic signed [1:0]                 lif_x,
  input  logic [LIF_CNT_W-1:0]              lif_skip_in,
  output logic                              lif_spike,
  output logic [LIF_CNT_W-1:0]              lif_s_out,
  output data_t                             lif_u,
  output logic [$clog2(LIF_TIMESTEPS+1)-1:0] lif_t,
  output logic                              lif_done
);

  dianet_accel #(
    .ROWS(ROWS), .COLS(COLS),
    .IN_FIFO_DEPTH(IN_FIFO_DEPTH), .OUT_FIFO_DEPTH(OUT_FIFO_DEPTH)
  ) u_accel (
    .clk, .rst_n, .start, .cfg_base, .cfg_words, .in_base, .in_words, .out_base,
    .task_mask, .task_labels, .busy, .done, .cycles,
    .rd_req, .rd_addr, .rd_gnt, .rd_rvalid, .rd_rdata,
    .wr_req, .wr_addr, .wr_data, .wr_gnt,
    .result_valid, .result_label, .result_value,
    .routed, .dropped, .out_stall_cycles, .written, .cfg_so
  );

  pif_neuron #(
    .N_IN(PIF_N_IN), .IN_W(PIF_IN_W), .U_W(PIF_U_W), .TIMESTEPS(PIF_TIMESTEPS)
  ) u_pif (
    .clk, .rst_n,
    .start     (pif_start),
    .step      (pif_step),
    .is_output (pif_is_output),
    .spikes_in (pif_spikes_in),
    .w_pos     (pif_w_pos),
    .w_neg     (pif_w_neg),
    .vth       (pif_vth),
    .bias      (pif_bias),
    .spike     (pif_spike),
    .u         (pif_u),
    .t         (pif_t),
    .done      (pif_done)
  );

  lif_pe #(
    .DATA_W(DATA_W), .FRAC_W(FRAC_W), .CNT_W(LIF_CNT_W), .TIMESTEPS(LIF_TIMESTEPS)
  ) u_lif (
    .clk, .rst_n,
    .start     (lif_start),
    .step      (lif_step),
    .is_output (lif_is_output),
    .w0        (lif_w0),
    .w1        (lif_w1),
    .wx        (lif_wx),
    .bias      (lif_bias),
    .vth       (lif_vth),
    .s0        (lif_s0),
    .s1        (lif_s1),
    .x         (lif_x),
    .skip_in   (lif_skip_in),
    .spike     (lif_spike),
    .s_out     (lif_s_out),
    .u         (lif_u),
    .t         (lif_t),
    .done      (lif_done)
  );

endmodule
