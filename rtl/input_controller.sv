// input_controller: the local input controller. It streams the input words
// of an inference from external memory into the input FIFO (step two of an
// inference).
//
// On start it issues nwords reads from base upward. Reads are pipelined: a
// new request goes out every cycle the memory grants one, as long as the
// words already in the FIFO plus the reads still in flight leave room for
// one more, so returning data can always be pushed and the FIFO never
// overflows. Read data return in order with rd_rvalid and are pushed into
// the FIFO the same cycle. done pulses once the last word has been pushed.
// The credit scheme and the memory handshake are this design's choices.
module input_controller
  import dianet_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [MEM_AW-1:0]           base,
  input  logic [MEM_AW-1:0]           nwords,
  output logic                        busy,
  output logic                        done,
  // memory read port
  output logic                        rd_req,
  output logic [MEM_AW-1:0]           rd_addr,
  input  logic                        rd_gnt,
  input  logic                        rd_rvalid,
  input  logic [MEM_DW-1:0]           rd_rdata,
  // input FIFO write side
  output logic                        fifo_push,
  output logic [MEM_DW-1:0]           fifo_wdata,
  input  logic [$clog2(FIFO_DEPTH):0] fifo_count
);

  logic [MEM_AW-1:0] to_issue, to_recv;
  logic [$clog2(FIFO_DEPTH):0] inflight;
  logic active;

  assign busy   = active;
  assign rd_req = active && (to_issue != '0) &&
                  (32'(fifo_count) + 32'(inflight) < FIFO_DEPTH);

  assign fifo_push  = active && rd_rvalid;
  assign fifo_wdata = rd_rdata;

  logic issue, recv;
  assign issue = rd_req && rd_gnt;
  assign recv  = active && rd_rvalid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      to_issue <= '0;
      to_recv  <= '0;
      inflight <= '0;
      rd_addr  <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          rd_addr  <= base;
          to_issue <= nwords;
          to_recv  <= nwords;
          inflight <= '0;
          if (nwords == '0) done   <= 1'b1;
          else              active <= 1'b1;
        end
      end else begin
        if (issue) begin
          rd_addr  <= rd_addr + 1'b1;
          to_issue <= to_issue - 1'b1;
        end
        inflight <= inflight + $bits(inflight)'(issue) - $bits(inflight)'(recv);
        if (recv) begin
          to_recv <= to_recv - 1'b1;
          if (to_recv == MEM_AW'(1)) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end
      end
    end
  end

  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  rd_req && !rd_gnt |=> $stable(rd_addr))
    else $error("input_controller: read address changed while waiting for grant");

endmodule
