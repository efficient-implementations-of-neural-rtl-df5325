// config_loader: fills the configuration scan chain of the PE array from
// external memory (step one of an inference: partition and reconfigure the
// array).
//
// On start it reads nwords consecutive MEM_DW-bit words from base, one read
// at a time, and shifts each word into the chain MSB first, one bit per
// cycle, with cfg_shift high. A word therefore costs MEM_DW shift cycles plus
// the memory latency. done pulses for one cycle after the last bit. The
// bitstream layout is fixed by pe_array: the words hold
// {cfg(PE N-1), ..., cfg(PE 0)} MSB first, preceded by padding bits that
// shift out of the far end of the chain when N*CFG_W is not a multiple of
// MEM_DW. Serial loading follows the description of the architecture; the
// memory handshake (req/gnt, then rvalid with the data) is this design's.
module config_loader
  import dianet_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [MEM_AW-1:0] base,
  input  logic [MEM_AW-1:0] nwords,
  output logic              busy,
  output logic              done,
  // memory read port
  output logic              rd_req,
  output logic [MEM_AW-1:0] rd_addr,
  input  logic              rd_gnt,
  input  logic              rd_rvalid,
  input  logic [MEM_DW-1:0] rd_rdata,
  // scan chain
  output logic              cfg_shift,
  output logic              cfg_bit
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT, S_SHIFT} state_t;
  state_t state;

  logic [MEM_AW-1:0]         left;     // words still to read
  logic [MEM_DW-1:0]         sreg;
  logic [$clog2(MEM_DW)-1:0] bitcnt;

  assign busy      = (state != S_IDLE);
  assign rd_req    = (state == S_REQ);
  assign cfg_shift = (state == S_SHIFT);
  assign cfg_bit   = sreg[MEM_DW-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      left    <= '0;
      rd_addr <= '0;
      sreg    <= '0;
      bitcnt  <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rd_addr <= base;
          left    <= nwords;
          if (nwords == '0) done  <= 1'b1;
          else              state <= S_REQ;
        end
        S_REQ: if (rd_gnt) state <= S_WAIT;
        S_WAIT: if (rd_rvalid) begin
          sreg    <= rd_rdata;
          bitcnt  <= '0;
          left    <= left - 1'b1;
          rd_addr <= rd_addr + 1'b1;
          state   <= S_SHIFT;
        end
        S_SHIFT: begin
          sreg   <= {sreg[MEM_DW-2:0], 1'b0};
          bitcnt <= bitcnt + 1'b1;
          if (bitcnt == $clog2(MEM_DW)'(MEM_DW - 1)) begin
            if (left == '0) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_REQ;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_addr_stable: assert property (@(posedge clk) disable iff (!rst_n)
                                  rd_req && !rd_gnt |=> $stable(rd_addr))
    else $error("config_loader: read address changed while waiting for grant");

endmodule
