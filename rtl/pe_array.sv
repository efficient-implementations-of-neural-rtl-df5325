// pe_array: ROWS x COLS array of DiaNet PEs joined by the bisection local
// network and the configuration scan chain.
//
// Row r is a layer and column c a neuron position. Every PE sees the outputs
// of the three PEs at columns c-1, c, c+1 of row r-1 and picks two of them
// (bisection connection), and the output of the PE at column c of row r-2
// (skip connection). There are no other wires: all communication is local,
// so the array can be partitioned into independent DiaNets of any shape by
// configuration alone, and PEs outside every DiaNet are simply disabled.
// Neighbours beyond the array edge read as zero and never valid.
//
// The array is 20 x 20 by default, the size of the evaluated prototype.
//
// Scan chain: cfg_si enters PE 0 (row 0, column 0) and leaves PE ROWS*COLS-1
// at cfg_so, in row-major order; each PE holds CFG_W bits. To configure the
// whole array, shift the concatenation {cfg(PE N-1), ..., cfg(PE 0)} in MSB
// first, N*CFG_W cycles with cfg_shift high.
//
// Each PE's clear is clear[task_id of that PE], so one task can restart
// while another is still running. Input features arrive as a one-hot write
// strobe x_we (row-major index) with x_data from the data router.
module pe_array
  import dianet_pkg::*;
#(
  parameter int unsigned ROWS = 20,
  parameter int unsigned COLS = 20
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    cfg_shift,
  input  logic                    cfg_si,
  output logic                    cfg_so,
  input  logic [NUM_TASKS-1:0]    clear,
  input  logic [ROWS*COLS-1:0]    x_we,
  input  data_t                   x_data,
  output data_t   [ROWS*COLS-1:0] z,
  output logic    [ROWS*COLS-1:0] z_valid,
  output pe_cfg_t [ROWS*COLS-1:0] cfg
);

  localparam int unsigned N = ROWS * COLS;

  logic [N:0] chain;
  assign chain[0] = cfg_si;
  assign cfg_so   = chain[N];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned I = r * COLS + c;
      data_t nl, nm, nr, sk;
      logic  nlv, nmv, nrv, skv;

      if (r > 0) begin : g_prev
        assign nm  = z[I-COLS];
        assign nmv = z_valid[I-COLS];
        if (c > 0) begin : g_l
          assign nl  = z[I-COLS-1];
          assign nlv = z_valid[I-COLS-1];
        end else begin : g_nl
          assign nl  = '0;
          assign nlv = 1'b0;
        end
        if (c < COLS - 1) begin : g_r
          assign nr  = z[I-COLS+1];
          assign nrv = z_valid[I-COLS+1];
        end else begin : g_nr
          assign nr  = '0;
          assign nrv = 1'b0;
        end
      end else begin : g_noprev
        assign nl = '0; assign nm = '0; assign nr = '0;
        assign nlv = 1'b0; assign nmv = 1'b0; assign nrv = 1'b0;
      end

      if (r > 1) begin : g_skip
        assign sk  = z[I-2*COLS];
        assign skv = z_valid[I-2*COLS];
      end else begin : g_noskip
        assign sk  = '0;
        assign skv = 1'b0;
      end

      dianet_pe u_pe (
        .clk        (clk),
        .rst_n      (rst_n),
        .cfg_shift  (cfg_shift),
        .cfg_si     (chain[I]),
        .cfg_so     (chain[I+1]),
        .cfg        (cfg[I]),
        .clear      (clear[cfg[I].task_id]),
        .nb_left    (nl),
        .nb_left_v  (nlv),
        .nb_mid     (nm),
        .nb_mid_v   (nmv),
        .nb_right   (nr),
        .nb_right_v (nrv),
        .skip_in    (sk),
        .skip_v     (skv),
        .x_we       (x_we[I]),
        .x_data     (x_data),
        .z          (z[I]),
        .z_valid    (z_valid[I])
      );
    end
  end

endmodule
