// dianet_accel: multi-grained reconfigurable accelerator for bisection
// neural networks (DiaNets).
//
// A ROWS x COLS array of PEs (20 x 20 by default) is wired as a bisection
// mesh: each PE holds two synapses, one neuron and talks only to adjacent
// PEs. By configuration alone the array is cut into independent DiaNets
// (one per task, up to NUM_TASKS) that all run in parallel:
//   fine grain   - weights, bias and activation inside each PE;
//   mid grain    - which PEs form a DiaNet and in which shape;
//   coarse grain - how many DiaNets share the array.
// Around the array sit the blocks of the architecture overview:
//   config_loader    + scan chain   : loads the configuration serially,
//   input_controller + input FIFO   : reads inputs from external memory,
//   data_router                     : hands each feature to its PE,
//   output_channel   + output FIFO  : collects output-neuron values,
//   output_controller               : writes them back to external memory,
//   argmax_unit                     : comparators giving each task's label,
//   accel_ctrl                      : runs the four steps of an inference.
// PEs fire as soon as their operands arrive (dataflow, not systolic).
//
// External memory is off chip and reached through one read port (config and
// inputs, pipelined, in-order: req/gnt then rvalid/rdata) and one write port
// (req/gnt). Memory formats are dianet_pkg::in_word_t and out_word_t; the
// configuration bitstream layout is described in pe_array. Operation: pulse
// start with the bases and lengths; busy stays high until every task in
// task_mask has its label, then done pulses and cycles gives the run length.
// task_labels[t] tells the comparators how many output neurons task t has.
// FIFO depths, port handshakes and memory formats are this design's choices.
module dianet_accel
  import dianet_pkg::*;
#(
  parameter int unsigned ROWS           = 20,
  parameter int unsigned COLS           = 20,
  parameter int unsigned IN_FIFO_DEPTH  = 16,
  parameter int unsigned OUT_FIFO_DEPTH = 16
) (
  input  logic                             clk,
  input  logic                             rst_n,
  // command
  input  logic                             start,
  input  logic [MEM_AW-1:0]                cfg_base,
  input  logic [MEM_AW-1:0]                cfg_words,
  input  logic [MEM_AW-1:0]                in_base,
  input  logic [MEM_AW-1:0]                in_words,
  input  logic [MEM_AW-1:0]                out_base,
  input  logic [NUM_TASKS-1:0]             task_mask,
  input  logic [NUM_TASKS-1:0][LABEL_W:0]  task_labels,
  output logic                             busy,
  output logic                             done,
  output logic [31:0]                      cycles,
  // external memory read port
  output logic                             rd_req,
  output logic [MEM_AW-1:0]                rd_addr,
  input  logic                             rd_gnt,
  input  logic                             rd_rvalid,
  input  logic [MEM_DW-1:0]                rd_rdata,
  // external memory write port
  output logic                             wr_req,
  output logic [MEM_AW-1:0]                wr_addr,
  output logic [MEM_DW-1:0]                wr_data,
  input  logic                             wr_gnt,
  // classification results
  output logic [NUM_TASKS-1:0]             result_valid,
  output logic [NUM_TASKS-1:0][LABEL_W-1:0] result_label,
  output data_t [NUM_TASKS-1:0]            result_value,
  // status
  output logic [15:0]                      routed,
  output logic [15:0]                      dropped,
  output logic [15:0]                      out_stall_cycles,
  output logic [MEM_AW-1:0]                written,
  output logic                             cfg_so     // scan chain end, for read-back
);

  localparam int unsigned N = ROWS * COLS;

  // ---------------- control ----------------
  logic cfg_start, cfg_done, in_start, in_done, out_start, sel_cfg;
  logic [NUM_TASKS-1:0] clear;

  accel_ctrl u_ctrl (
    .clk, .rst_n, .start, .cfg_words, .task_mask,
    .busy, .done, .cycles,
    .cfg_start, .cfg_done, .in_start, .in_done, .out_start, .clear,
    .result_valid, .sel_cfg
  );

  // ---------------- read port sharing ----------------
  logic              cl_req, ic_req;
  logic [MEM_AW-1:0] cl_addr, ic_addr;
  logic              cl_busy, ic_busy;

  assign rd_req  = sel_cfg ? cl_req  : ic_req;
  assign rd_addr = sel_cfg ? cl_addr : ic_addr;

  // ---------------- configuration ----------------
  logic cfg_shift, cfg_bit;

  config_loader u_cfg (
    .clk, .rst_n,
    .start    (cfg_start),
    .base     (cfg_base),
    .nwords   (cfg_words),
    .busy     (cl_busy),
    .done     (cfg_done),
    .rd_req   (cl_req),
    .rd_addr  (cl_addr),
    .rd_gnt   (rd_gnt && sel_cfg),
    .rd_rvalid(rd_rvalid && sel_cfg),
    .rd_rdata,
    .cfg_shift,
    .cfg_bit
  );

  // ---------------- input path ----------------
  logic                           inf_push, inf_pop, inf_empty, inf_full;
  logic [MEM_DW-1:0]              inf_wdata, inf_rdata;
  logic [$clog2(IN_FIFO_DEPTH):0] inf_count;

  input_controller #(.FIFO_DEPTH(IN_FIFO_DEPTH)) u_in (
    .clk, .rst_n,
    .start     (in_start),
    .base      (in_base),
    .nwords    (in_words),
    .busy      (ic_busy),
    .done      (in_done),
    .rd_req    (ic_req),
    .rd_addr   (ic_addr),
    .rd_gnt    (rd_gnt && !sel_cfg),
    .rd_rvalid (rd_rvalid && !sel_cfg),
    .rd_rdata,
    .fifo_push (inf_push),
    .fifo_wdata(inf_wdata),
    .fifo_count(inf_count)
  );

  sync_fifo #(.WIDTH(MEM_DW), .DEPTH(IN_FIFO_DEPTH)) u_in_fifo (
    .clk, .rst_n,
    .push (inf_push),
    .wdata(inf_wdata),
    .pop  (inf_pop),
    .rdata(inf_rdata),
    .empty(inf_empty),
    .full (inf_full),
    .count(inf_count)
  );

  logic [N-1:0] x_we;
  data_t        x_data;

  data_router #(.ROWS(ROWS), .COLS(COLS)) u_router (
    .clk, .rst_n,
    .fifo_rdata(inf_rdata),
    .fifo_empty(inf_empty),
    .fifo_pop  (inf_pop),
    .x_we,
    .x_data,
    .dropped,
    .routed
  );

  // ---------------- PE array ----------------
  data_t   [N-1:0] z;
  logic    [N-1:0] z_valid;
  pe_cfg_t [N-1:0] pe_cfg;

  pe_array #(.ROWS(ROWS), .COLS(COLS)) u_array (
    .clk, .rst_n,
    .cfg_shift,
    .cfg_si  (cfg_bit),
    .cfg_so,
    .clear,
    .x_we,
    .x_data,
    .z,
    .z_valid,
    .cfg     (pe_cfg)
  );

  // ---------------- output path ----------------
  logic                            of_push, of_pop, of_empty, of_full;
  logic [MEM_DW-1:0]               of_wdata, of_rdata;
  logic [$clog2(OUT_FIFO_DEPTH):0] of_count;

  output_channel #(.N(N)) u_out_ch (
    .clk, .rst_n,
    .clear,
    .z,
    .z_valid,
    .cfg         (pe_cfg),
    .fifo_push   (of_push),
    .fifo_wdata  (of_wdata),
    .fifo_full   (of_full),
    .stall_cycles(out_stall_cycles)
  );

  sync_fifo #(.WIDTH(MEM_DW), .DEPTH(OUT_FIFO_DEPTH)) u_out_fifo (
    .clk, .rst_n,
    .push (of_push),
    .wdata(of_wdata),
    .pop  (of_pop),
    .rdata(of_rdata),
    .empty(of_empty),
    .full (of_full),
    .count(of_count)
  );

  logic              cmp_valid;
  logic [MEM_DW-1:0] cmp_word;

  output_controller u_out (
    .clk, .rst_n,
    .start     (out_start),
    .base      (out_base),
    .fifo_rdata(of_rdata),
    .fifo_empty(of_empty),
    .fifo_pop  (of_pop),
    .wr_req,
    .wr_addr,
    .wr_data,
    .wr_gnt,
    .cmp_valid,
    .cmp_word,
    .written
  );

  argmax_unit u_argmax (
    .clk, .rst_n,
    .clear,
    .labels      (task_labels),
    .in_valid    (cmp_valid),
    .in_word     (cmp_word),
    .result_valid,
    .result_label,
    .result_value
  );

endmodule
