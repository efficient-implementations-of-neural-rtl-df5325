// output_channel: gathers the values of output neurons into the output FIFO.
//
// A PE configured with is_out is an output neuron of some DiaNet (task) and
// stands for one label. When its output becomes valid it asks for the
// channel; the channel grants the lowest-numbered requesting PE each cycle
// the FIFO is not full, pushes {task, label, value} (dianet_pkg::out_word_t)
// and marks that PE as sent, so every output neuron is sent exactly once per
// inference. Several tasks share the channel. clear[t] forgets the sent marks
// of task t's PEs for its next inference. A full FIFO stalls the channel
// (the requests simply wait) and is counted in stall_cycles. The fixed
// priority arbiter is this design's choice.
module output_channel
  import dianet_pkg::*;
#(
  parameter int unsigned N = 400
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NUM_TASKS-1:0]  clear,
  input  data_t   [N-1:0]       z,
  input  logic    [N-1:0]       z_valid,
  input  pe_cfg_t [N-1:0]       cfg,
  // output FIFO write side
  output logic                  fifo_push,
  output logic [MEM_DW-1:0]     fifo_wdata,
  input  logic                  fifo_full,
  output logic [15:0]           stall_cycles
);

  logic [N-1:0] sent, req;
  logic [$clog2(N)-1:0] sel;
  logic any;

  for (genvar i = 0; i < N; i++) begin : g_req
    assign req[i] = cfg[i].en && cfg[i].is_out && z_valid[i] && !sent[i] &&
                    !clear[cfg[i].task_id];
  end

  // Fixed-priority arbiter: lowest index wins.
  always_comb begin
    sel = '0;
    any = 1'b0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) begin
        sel = $clog2(N)'(i);
        any = 1'b1;
      end
    end
  end

  out_word_t ow;
  always_comb begin
    ow         = '0;
    ow.task_id = cfg[sel].task_id;
    ow.label   = cfg[sel].label;
    ow.data    = z[sel];
  end

  assign fifo_push  = any && !fifo_full;
  assign fifo_wdata = MEM_DW'(ow);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sent         <= '0;
      stall_cycles <= '0;
    end else begin
      for (int i = 0; i < N; i++)
        if (clear[cfg[i].task_id]) sent[i] <= 1'b0;
      if (fifo_push) sent[sel] <= 1'b1;
      if (any && fifo_full) stall_cycles <= stall_cycles + 1'b1;
    end
  end

endmodule
