// data_router: delivers input features from the input FIFO to the PEs that
// take them.
//
// Each input word (dianet_pkg::in_word_t) names its destination PE by row
// and column. The router pops one word per cycle whenever the FIFO is not
// empty, decodes the address into a one-hot write strobe over the array and
// drives the value on a shared bus; both are registered, so a word reaches
// its PE's feature register two cycles after it is at the FIFO head. Words
// whose address lies outside the array are dropped and counted in dropped.
// With one shared bus the router delivers one feature per cycle; this
// broadcast-and-decode form is this design's reading of the router, whose
// insides are not given.
module data_router
  import dianet_pkg::*;
#(
  parameter int unsigned ROWS = 20,
  parameter int unsigned COLS = 20
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // input FIFO read side
  input  logic [MEM_DW-1:0]    fifo_rdata,
  input  logic                 fifo_empty,
  output logic                 fifo_pop,
  // to the PE array
  output logic [ROWS*COLS-1:0] x_we,
  output data_t                x_data,
  output logic [15:0]          dropped,
  output logic [15:0]          routed
);

  in_word_t w;
  assign w        = in_word_t'(fifo_rdata);
  assign fifo_pop = !fifo_empty;

  logic in_range;
  assign in_range = (32'(w.row) < ROWS) && (32'(w.col) < COLS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_we    <= '0;
      x_data  <= '0;
      dropped <= '0;
      routed  <= '0;
    end else begin
      x_we <= '0;
      if (fifo_pop) begin
        if (in_range) begin
          x_we[32'(w.row) * COLS + 32'(w.col)] <= 1'b1;
          x_data <= w.data;
          routed <= routed + 1'b1;
        end else begin
          dropped <= dropped + 1'b1;
        end
      end
    end
  end

endmodule
