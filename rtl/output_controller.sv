// output_controller: write-back of results (last step of an inference).
//
// It drains the output FIFO into external memory: the head word goes out on
// the write port, and when the memory grants the write the word is popped,
// the address advances and the same word is handed to the label comparators
// (cmp_valid/cmp_word) in that cycle. start sets the first address to base
// and zeroes written. One word per cycle can retire when the memory grants
// every cycle. The write handshake (req/gnt) is this design's choice.
module output_controller
  import dianet_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [MEM_AW-1:0] base,
  // output FIFO read side
  input  logic [MEM_DW-1:0] fifo_rdata,
  input  logic              fifo_empty,
  output logic              fifo_pop,
  // memory write port
  output logic              wr_req,
  output logic [MEM_AW-1:0] wr_addr,
  output logic [MEM_DW-1:0] wr_data,
  input  logic              wr_gnt,
  // to the comparators
  output logic              cmp_valid,
  output logic [MEM_DW-1:0] cmp_word,
  output logic [MEM_AW-1:0] written
);

  assign wr_req    = !fifo_empty && !start;
  assign wr_data   = fifo_rdata;
  assign fifo_pop  = wr_req && wr_gnt;
  assign cmp_valid = fifo_pop;
  assign cmp_word  = fifo_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_addr <= '0;
      written <= '0;
    end else if (start) begin
      wr_addr <= base;
      written <= '0;
    end else if (fifo_pop) begin
      wr_addr <= wr_addr + 1'b1;
      written <= written + 1'b1;
    end
  end

  a_data_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  wr_req && !wr_gnt && !start |=> $stable(wr_addr))
    else $error("output_controller: write address changed while waiting for grant");

endmodule
