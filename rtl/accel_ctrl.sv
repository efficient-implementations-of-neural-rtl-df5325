// accel_ctrl: sequences one inference of the accelerator through its four
// steps:
//   1. CFG:  the config loader shifts the configuration into the scan chain,
//            partitioning and reconfiguring the array (skipped when
//            cfg_words is zero, so an array that is already configured can
//            run new inputs at once);
//   2. CLR/IN: the tasks in task_mask are cleared, the write-back address is
//            reset, and the input controller streams all input words through
//            the input FIFO and the data router into the PEs;
//   3. RUN:  PEs fire as their operands arrive (this overlaps step 2);
//   4. the output words drain to memory and the comparators; the run ends
//      when every task in task_mask has its label.
// done pulses for one cycle at the end and cycles holds the length of the
// last run, from start to done. The state encoding and the overlap of steps
// 2 to 4 are this design's choices.
module accel_ctrl
  import dianet_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [MEM_AW-1:0]    cfg_words,
  input  logic [NUM_TASKS-1:0] task_mask,
  output logic                 busy,
  output logic                 done,
  output logic [31:0]          cycles,
  // step control
  output logic                 cfg_start,
  input  logic                 cfg_done,
  output logic                 in_start,
  input  logic                 in_done,
  output logic                 out_start,
  output logic [NUM_TASKS-1:0] clear,
  input  logic [NUM_TASKS-1:0] result_valid,
  output logic                 sel_cfg     // memory read port to the config loader
);

  typedef enum logic [2:0] {S_IDLE, S_CFG, S_CLR, S_IN, S_RUN} state_t;
  state_t state;

  logic [NUM_TASKS-1:0] mask_q;
  logic [31:0]          cnt;

  assign busy    = (state != S_IDLE);
  assign sel_cfg = (state == S_CFG);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      mask_q    <= '0;
      cnt       <= '0;
      cycles    <= '0;
      done      <= 1'b0;
      cfg_start <= 1'b0;
      in_start  <= 1'b0;
      out_start <= 1'b0;
      clear     <= '0;
    end else begin
      done      <= 1'b0;
      cfg_start <= 1'b0;
      in_start  <= 1'b0;
      out_start <= 1'b0;
      clear     <= '0;
      if (state != S_IDLE) cnt <= cnt + 1;
      unique case (state)
        S_IDLE: if (start) begin
          mask_q <= task_mask;
          cnt    <= 32'd1;
          if (cfg_words != '0) begin
            cfg_start <= 1'b1;
            state     <= S_CFG;
          end else begin
            clear     <= task_mask;
            out_start <= 1'b1;
            state     <= S_CLR;
          end
        end
        S_CFG: if (cfg_done) begin
          clear     <= mask_q;
          out_start <= 1'b1;
          state     <= S_CLR;
        end
        S_CLR: begin
          in_start <= 1'b1;
          state    <= S_IN;
        end
        S_IN: if (in_done) state <= S_RUN;
        S_RUN: if ((result_valid & mask_q) == mask_q) begin
          state  <= S_IDLE;
          done   <= 1'b1;
          cycles <= cnt;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
