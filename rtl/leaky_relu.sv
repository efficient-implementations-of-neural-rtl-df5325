// leaky_relu: the neuron activation of a DiaNet PE.
//
// LeakyReLU passes non-negative values unchanged and scales negative values
// by a negative slope. With slopes of 1/8 and 1/16 the scaling is an
// arithmetic right shift, so the whole unit is one sign test (the comparator)
// and a multiplexer, with no multiplier. Plain ReLU and the identity are also
// selectable: the identity serves output neurons, whose raw value goes to the
// label comparators. Sigmoid is not offered; it needs an exponential and was
// found the least accurate of the candidate activations.
//
// Interface: purely combinational. act selects the function (dianet_pkg::act_t);
// din and dout are W-bit two's complement values on the same fixed-point
// scale. The shift rounds toward minus infinity (plain arithmetic shift),
// which is this design's choice.
module leaky_relu
  import dianet_pkg::*;
#(
  parameter int unsigned W = 24
) (
  input  act_t                act,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);

  always_comb begin
    unique case (act)
      ACT_NONE: dout = din;
      ACT_RELU: dout = din[W-1] ? '0 : din;
      ACT_LR8:  dout = din[W-1] ? (din >>> 3) : din;
      ACT_LR16: dout = din[W-1] ? (din >>> 4) : din;
      default:  dout = din;
    endcase
  end

endmodule
