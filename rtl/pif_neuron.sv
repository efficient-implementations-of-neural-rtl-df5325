// pif_neuron: parametric integrate-and-fire (PIF) neuron of a ternary-weight
// spiking neural network (TSNN), computing with the binary-ternary dot
// product instead of multiply-accumulate.
//
// With ternary weights T in {-1, 0, +1} scaled by one factor alpha per layer,
// and the membrane potential kept divided by alpha, one timestep is
//     u(t+1) = u(t) + sum_j o_j(t+1) * T_j + b/alpha - (Vth/alpha) * o(t)
//     o(t+1) = u(t+1) > Vth/alpha
// The products o_j * T_j need no multiplier: an input adds to the sum when its
// weight is +1, subtracts when it is -1 and is ignored when it is 0. The
// subtraction of the threshold after a spike is the soft reset. In output mode
// (is_output) the neuron only accumulates and never fires, as the last layer
// of the network does. Inputs are small unsigned counts of IN_W bits: 0/1
// spikes, or 0..2 where a one-layer-skip residual connection adds the spike of
// the layer before the previous one. The threshold Vth/alpha and bias b/alpha
// are fixed in inference and are inputs here, in fixed point with U_FRAC
// fractional bits.
//
// Interface and timing: pulse start to clear the membrane and the spike
// history. Each step pulse performs one timestep on spikes_in: u and spike
// update at that clock edge, so the spike of timestep t is visible in the cycle
// after its step. After TIMESTEPS steps done rises and stays high until start.
// The fan-in N_IN of 1152 (3x3 kernels over 128 channels), the word widths and
// the exact '>' comparison with saturation are this design's choices; the
// update rule, the soft reset, the non-firing output layer and the default of
// 4 timesteps follow the TSNN method.
module pif_neuron #(
  parameter int unsigned N_IN      = 1152,
  parameter int unsigned IN_W      = 2,
  parameter int unsigned U_W       = 24,
  parameter int unsigned U_FRAC    = 8,
  parameter int unsigned TIMESTEPS = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic                        step,
  input  logic                        is_output,
  input  logic [N_IN-1:0][IN_W-1:0]   spikes_in,   // o_j(t+1), 0..2^IN_W-1
  input  logic [N_IN-1:0]             w_pos,       // T_j = +1
  input  logic [N_IN-1:0]             w_neg,       // T_j = -1 (w_pos wins if both)
  input  logic signed [U_W-1:0]       vth,         // Vth/alpha, U_FRAC fraction bits
  input  logic signed [U_W-1:0]       bias,        // b/alpha,   U_FRAC fraction bits
  output logic                        spike,       // o(t)
  output logic signed [U_W-1:0]       u,           // membrane potential / alpha
  output logic [$clog2(TIMESTEPS+1)-1:0] t,
  output logic                        done
);

  localparam int unsigned SW = $clog2(N_IN) + IN_W + 2;

  // Binary-ternary dot product: add, subtract or skip each input.
  logic signed [SW-1:0] dot;
  always_comb begin
    dot = '0;
    for (int j = 0; j < N_IN; j++) begin
      if (w_pos[j])      dot = dot + SW'(spikes_in[j]);
      else if (w_neg[j]) dot = dot - SW'(spikes_in[j]);
    end
  end

  logic signed [U_W+1:0] u_next;
  always_comb begin
    u_next = (U_W+2)'(u) + ((U_W+2)'(dot) <<< U_FRAC) + (U_W+2)'(bias);
    if (spike && !is_output) u_next = u_next - (U_W+2)'(vth);
  end

  localparam logic signed [U_W+1:0] UMAX = (U_W+2)'((64'sd1 <<< (U_W-1)) - 1);
  localparam logic signed [U_W+1:0] UMIN = -(U_W+2)'(64'sd1 <<< (U_W-1));

  logic signed [U_W-1:0] u_sat;
  always_comb begin
    if (u_next > UMAX)      u_sat = UMAX[U_W-1:0];
    else if (u_next < UMIN) u_sat = UMIN[U_W-1:0];
    else                    u_sat = u_next[U_W-1:0];
  end

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
