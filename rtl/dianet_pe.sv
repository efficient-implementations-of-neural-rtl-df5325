// dianet_pe: one processing element of the bisection (DiaNet) PE array.
//
// A PE packages two synapses and one neuron. Its neuron sits at row r
// (layer) and column c of the array and takes two activations from the
// previous row: from columns (c-1, c) in an expansion layer or from (c, c+1)
// in a shrinkage layer. On top of the bisection pair it has the two
// additions of the evolved topologies:
//   * a third synapse for an input feature x fed straight into this hidden
//     neuron (I/O layer integration), and
//   * a weightless skip connection that adds the output of the PE two rows
//     above, in the same column, after the activation (skip connections).
// The PE computes
//     z = act(w0*a0 + w1*a1 + wx*x + b) + z_skip
// with each term present only when its use_* bit is set, and act one of
// identity, ReLU or LeakyReLU with slope 1/8 or 1/16. The column used for
// the skip source, the truncating product scaling and the saturation at the
// end are this design's choices.
//
// Dataflow: there is no global schedule. The PE fires in the first cycle in
// which every input it uses is valid, registers z and raises z_valid one
// cycle later; z then holds until clear. clear (the PE's task clear, chosen
// by the array) drops z_valid and the stored input feature so that a new
// inference can start. A PE with en=0 never fires.
//
// Configuration: the PE owns CFG_W bits of the serial config scan chain.
// While cfg_shift is high every bit moves one place per cycle from cfg_si
// toward cfg_so (MSB out first), and the PE stays idle. Reset clears the
// configuration, so an unconfigured array is all disabled.
module dianet_pe
  import dianet_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  // config scan chain
  input  logic    cfg_shift,
  input  logic    cfg_si,
  output logic    cfg_so,
  output pe_cfg_t cfg,
  // per-inference clear
  input  logic    clear,
  // neighbours in the previous row: columns c-1, c, c+1
  input  data_t   nb_left,
  input  logic    nb_left_v,
  input  data_t   nb_mid,
  input  logic    nb_mid_v,
  input  data_t   nb_right,
  input  logic    nb_right_v,
  // skip source: same column, two rows above
  input  data_t   skip_in,
  input  logic    skip_v,
  // input feature from the data router
  input  logic    x_we,
  input  data_t   x_data,
  // neuron output
  output data_t   z,
  output logic    z_valid
);

  localparam int unsigned AW = 40;  // accumulator width

  logic [CFG_W-1:0] cfg_q;
  assign cfg    = pe_cfg_t'(cfg_q);
  assign cfg_so = cfg_q[CFG_W-1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         cfg_q <= '0;
    else if (cfg_shift) cfg_q <= {cfg_q[CFG_W-2:0], cfg_si};
  end

  // Stored input feature.
  data_t x_q;
  logic  x_valid;

  // Bisection pair selection.
  data_t a0, a1;
  logic  a0_v, a1_v;
  always_comb begin
    if (cfg.expand) begin
      a0 = nb_left; a0_v = nb_left_v;
      a1 = nb_mid;  a1_v = nb_mid_v;
    end else begin
      a0 = nb_mid;   a0_v = nb_mid_v;
      a1 = nb_right; a1_v = nb_right_v;
    end
  end

  logic ready;
  assign ready = (!cfg.use_a0   || a0_v)    &&
                 (!cfg.use_a1   || a1_v)    &&
                 (!cfg.use_x    || x_valid) &&
                 (!cfg.use_skip || skip_v);

  logic fire;
  assign fire = cfg.en && !cfg_shift && !clear && !z_valid && ready;

  // Synapses and soma.
  logic signed [2*DATA_W-1:0] p0, p1, px;
  logic signed [AW-1:0]       psum, soma, act_out, zsum;

  assign p0 = cfg.use_a0 ? a0  * $signed(cfg.w0) : (2*DATA_W)'(0);
  assign p1 = cfg.use_a1 ? a1  * $signed(cfg.w1) : (2*DATA_W)'(0);
  assign px = cfg.use_x  ? x_q * $signed(cfg.wx) : (2*DATA_W)'(0);

  always_comb begin
    psum = AW'(p0) + AW'(p1) + AW'(px);
    soma = (psum >>> FRAC_W) + AW'($signed(cfg.bias));
  end

  leaky_relu #(.W(AW)) u_act (
    .act  (cfg.act),
    .din  (soma),
    .dout (act_out)
  );

  assign zsum = act_out + (cfg.use_skip ? AW'(skip_in) : AW'(0));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q     <= '0;
      x_valid <= 1'b0;
      z       <= '0;
      z_valid <= 1'b0;
    end else if (cfg_shift || clear) begin
      x_valid <= 1'b0;
      z_valid <= 1'b0;
    end else begin
      if (x_we) begin
        x_q     <= x_data;
        x_valid <= 1'b1;
      end
      if (fire) begin
        z       <= sat(48'(zsum));
        z_valid <= 1'b1;
      end
    end
  end

endmodule
