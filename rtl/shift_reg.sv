// shift_reg: serial-in, parallel-out register that enters the neuron's
// operands one per clock.
//
// The neuron uses two of these: one for the input values and one for the
// weights. On each clock edge with `en` high the new word `d` enters stage 0
// and every stage moves one place along (stage i takes stage i-1); the word in
// the last stage is dropped. All stages are visible on `q`, so the MAC unit
// sees the last DEPTH words, newest in q[0]. This follows the shift registers
// of the reference MAC description, which shift on every clock; the `en` input
// and the synchronous clear to zero on `rst_n` low are this design's own
// additions so that a controller can hold the operands.
//
// Timing: q changes one cycle after the edge that samples d with en high.
module shift_reg #(
  parameter int unsigned W     = neuron_pkg::DATA_W,
  parameter int unsigned DEPTH = neuron_pkg::N_INPUTS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q [DEPTH]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) q[i] <= '0;
    end else if (en) begin
      q[0] <= d;
      for (int i = 1; i < int'(DEPTH); i++) q[i] <= q[i-1];
    end
  end

endmodule
