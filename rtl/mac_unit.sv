// mac_unit: multiply-accumulate core of the neuron (its inner product).
//
// It multiplies each input register stage with the matching weight register
// stage and adds the R products: a = sum_j p[j] * w[j]. As in the reference
// description it is purely combinational (multipliers and a chain of adders)
// and its result is 2*W bits wide, so a sum that exceeds 2*W bits wraps.
// The result is the linear output of the neuron, g(z) = z.
//
// Timing: combinational; `a` follows the register stages within the cycle.
module mac_unit #(
  parameter int unsigned W = neuron_pkg::DATA_W,
  parameter int unsigned R = neuron_pkg::N_INPUTS
) (
  input  logic signed [W-1:0]   p [R],
  input  logic signed [W-1:0]   w [R],
  output logic signed [2*W-1:0] a
);

  always_comb begin
    a = '0;
    for (int j = 0; j < int'(R); j++) a = a + (2*W)'(p[j]) * (2*W)'(w[j]);
  end

endmodule
