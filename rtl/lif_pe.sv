// lif_pe: processing element of the temporal-spatial combined bisection
// network (DiaNet4.0), a DiaNet PE whose neuron is an iterative leaky
// integrate-and-fire (LIF) neuron.
//
// Like the DiaNet PE it has two bisection synapses from adjacent neurons of
// the previous layer, one input-feature synapse and a bias, and it forwards
// its output plus the weightless skip value from two layers above. Here the
// values are spike counts: a neuron's forwarded count is its own spike plus
// the count arriving over the skip connection, so each input of a neuron is a
// small integer ("multi-spike"), CNT_W = 4 bits wide. Per timestep
//     u(t+1) = tau * u(t) * (1 - o(t)) + w0*s0 + w1*s1 + wx*x + b
//     o(t+1) = u(t+1) > Vth
// i.e. the membrane leaks by tau, is reset to zero after a spike (hard reset),
// and the input feature x is a signed Poisson-coded spike in {-1, 0, +1}.
// An output neuron (is_output) only integrates its inputs and never fires.
//
// Interface and timing: start clears the membrane, spike and step count; each
// step pulse performs one timestep on the inputs present in that cycle, and
// spike, s_out and u show the result from the next cycle. After TIMESTEPS
// steps done rises. Fixed point: u, weights, bias and Vth are DATA_W-bit words
// with FRAC_W fraction bits; tau is TAU_W-bit unsigned with TAU_W fraction
// bits. Defaults follow the MNIST setting (8 timesteps, decay 0.8, threshold
// 0.3, 4-bit activations); the word widths, rounding and saturation are this
// design's choices. Products of weights and 4-bit counts are written as
// multiplications; a table lookup is an equally valid implementation.
module lif_pe #(
  parameter int unsigned DATA_W    = 16,
  parameter int unsigned FRAC_W    = 9,
  parameter int unsigned CNT_W     = 4,
  parameter int unsigned TAU_W     = 8,
  parameter int unsigned TAU       = 205,   // 0.8 * 2^8
  parameter int unsigned TIMESTEPS = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      step,
  input  logic                      is_output,
  input  logic signed [DATA_W-1:0]  w0,
  input  logic signed [DATA_W-1:0]  w1,
  input  logic signed [DATA_W-1:0]  wx,
  input  logic signed [DATA_W-1:0]  bias,
  input  logic signed [DATA_W-1:0]  vth,
  input  logic [CNT_W-1:0]          s0,        // count from first neighbour
  input  logic [CNT_W-1:0]          s1,        // count from second neighbour
  input  logic signed [1:0]         x,         // Poisson spike: -1, 0, +1
  input  logic [CNT_W-1:0]          skip_in,   // count from two layers above
  output logic                      spike,
  output logic [CNT_W-1:0]          s_out,     // spike + skip_in, saturated
  output logic signed [DATA_W-1:0]  u,
  output logic [$clog2(TIMESTEPS+1)-1:0] t,
  output logic                      done
);

  localparam int unsigned AW = DATA_W + CNT_W + TAU_W + 4;

  logic signed [AW-1:0] leak, syn, u_next;
  always_comb begin
    leak   = spike ? AW'(0) : ((AW'(u) * $signed(AW'(TAU))) >>> TAU_W);
    syn    = AW'(w0) * $signed(AW'(s0)) + AW'(w1) * $signed(AW'(s1)) +
             AW'(wx) * AW'(x);
    u_next = leak + syn + AW'(bias);
  end

  localparam logic signed [AW-1:0] UMAX = AW'((64'sd1 <<< (DATA_W-1)) - 1);
  localparam logic signed [AW-1:0] UMIN = -AW'(64'sd1 <<< (DATA_W-1));

  logic signed [DATA_W-1:0] u_sat;
  always_comb begin
    if (u_next > UMAX)      u_sat = UMAX[DATA_W-1:0];
    else if (u_next < UMIN) u_sat = UMIN[DATA_W-1:0];
    else                    u_sat = u_next[DATA_W-1:0];
  end

  // Forwarded count: own spike plus the skip count, saturated.
  logic [CNT_W:0] cnt_sum;
  assign cnt_sum = (CNT_W+1)'(spike) + (CNT_W+1)'(skip_in);
  assign s_out   = cnt_sum[CNT_W] ? '1 : cnt_sum[CNT_W-1:0];

  assign done = (32'(t) == TIMESTEPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u     <= '0;
      spike <= 1'b0;
      t     <= '0;
    end else if (start) begin
      u     <= '0;
      spike <= 1'b0;
      t     <= '0;
    end else if (step && !done) begin
      u     <= u_sat;
      spike <= !is_output && (u_sat > vth);
      t     <= t + 1'b1;
    end
  end

endmodule
