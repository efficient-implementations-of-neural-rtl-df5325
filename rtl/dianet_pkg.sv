// dianet_pkg: types and constants shared by the DiaNet multi-grained
// reconfigurable accelerator.
//
// Data are signed fixed-point words of DATA_W bits with FRAC_W fractional
// bits. The 16-bit word with 9 fractional bits follows the bit-width study of
// the design (9 fractional and 6 integer bits cover the larger of the two
// evaluated tasks, and both tasks share one 16-bit configuration when they
// run side by side); the exact split into sign, integer and fraction bits is
// this design's choice.
//
// The per-PE configuration word (pe_cfg_t) is this design's own encoding of
// what a PE must be told: whether it is active, which pair of neighbours in
// the previous layer feeds it (expansion or shrinkage layer), which of its
// inputs are used, its activation, whether it is an output neuron and of
// which task and label, and its three weights and bias.
package dianet_pkg;

  localparam int unsigned DATA_W   = 16;  // fixed-point word
  localparam int unsigned FRAC_W   = 9;   // fractional bits
  localparam int unsigned LABEL_W  = 4;   // up to 16 output labels per task
  localparam int unsigned TASK_W   = 2;   // up to 4 tasks side by side
  localparam int unsigned NUM_TASKS = 1 << TASK_W;
  localparam int unsigned MEM_AW   = 16;  // external memory word address
  localparam int unsigned MEM_DW   = 32;  // external memory word

  typedef logic signed [DATA_W-1:0] data_t;

  // Activation selection (LeakyReLU slopes are powers of two: a shift).
  typedef enum logic [1:0] {
    ACT_NONE  = 2'd0,   // identity (output layer)
    ACT_RELU  = 2'd1,   // max(0, x)
    ACT_LR8   = 2'd2,   // LeakyReLU, negative slope 1/8
    ACT_LR16  = 2'd3    // LeakyReLU, negative slope 1/16
  } act_t;

  // Per-PE configuration held in the PE's segment of the scan chain.
  typedef struct packed {
    logic                en;        // PE belongs to some DiaNet
    logic                expand;    // 1: inputs (c-1, c); 0: inputs (c, c+1)
    logic                use_a0;    // synapse from first neighbour
    logic                use_a1;    // synapse from second neighbour
    logic                use_x;     // input-feature synapse (I/O integration)
    logic                use_skip;  // weightless skip from two rows above
    act_t                act;
    logic                is_out;    // output neuron: goes to output channel
    logic [LABEL_W-1:0]  label;
    logic [TASK_W-1:0]   task_id;
    logic                spare;     // pads the word to 80 bits
    data_t               w0;
    data_t               w1;
    data_t               wx;
    data_t               bias;
  } pe_cfg_t;

  localparam int unsigned CFG_W = $bits(pe_cfg_t);

  // Input word in external memory / input FIFO: destination PE and value.
  typedef struct packed {
    logic [5:0] pad;
    logic [4:0] row;
    logic [4:0] col;
    data_t      data;
  } in_word_t;

  // Output word in output FIFO / external memory.
  typedef struct packed {
    logic [9:0]          pad;
    logic [TASK_W-1:0]   task_id;
    logic [LABEL_W-1:0]  label;
    data_t               data;
  } out_word_t;

  // Saturate a wide signed value into a data word.
  function automatic data_t sat(input logic signed [47:0] v);
    localparam logic signed [47:0] MAXV = (48'sd1 <<< (DATA_W-1)) - 48'sd1;
    localparam logic signed [47:0] MINV = -(48'sd1 <<< (DATA_W-1));
    if (v > MAXV)      return data_t'(MAXV[DATA_W-1:0]);
    else if (v < MINV) return data_t'(MINV[DATA_W-1:0]);
    else               return data_t'(v[DATA_W-1:0]);
  endfunction

endpackage
