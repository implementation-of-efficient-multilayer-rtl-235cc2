// neuron: one multilayer-perceptron neuron, the top of this design.
//
// Inputs and their weights arrive one pair per clock. Each accepted pair is
// shifted into the input register and the weight register (two shift_reg
// instances of depth R). The MAC unit forms the inner product of the two
// registers combinationally; that is the neuron's linear output `lin_out`,
// which is valid at every cycle and equals the sum over the last R pairs.
// After every R-th accepted pair the controller starts the tan-sigmoid unit on
// the linear output; its result appears on `act_out` with a one-cycle
// `act_valid` pulse. While the activation unit is working the neuron does not
// accept new pairs (`in_ready` low), so a producer that keeps `in_valid` high
// is stalled until the result is out.
//
// The structure (input and weight shift registers, combinational MAC, then a
// sigmoid activation evaluated by its Taylor series) follows the document.
// The valid/ready handshake, the counting of R pairs per activation and the
// stall rule are this design's own choices. The linear output is taken as an
// integer (ACT_IN_FRAC = 0 fractional bits), as in the document's integer
// example, and the activation clamps it to +/-20.
//
// Timing: an accepted pair appears in lin_out in the next cycle. The R-th pair
// of a set starts the activation one cycle later; act_valid follows
// K + ACT_FRAC + 2 cycles after that, and in_ready rises again with it.
module neuron #(
  parameter int unsigned W           = neuron_pkg::DATA_W,
  parameter int unsigned R           = neuron_pkg::N_INPUTS,
  parameter int unsigned K           = neuron_pkg::TAYLOR_K,
  parameter int unsigned ACT_IN_FRAC = 0,
  parameter int unsigned ACT_W       = neuron_pkg::ACT_W,
  parameter int unsigned ACT_FRAC    = neuron_pkg::ACT_FRAC
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // operand stream
  input  logic                    in_valid,
  output logic                    in_ready,
  input  logic signed [W-1:0]     p,
  input  logic signed [W-1:0]     w,
  // linear output (inner product of the last R pairs)
  output logic signed [2*W-1:0]   lin_out,
  // tan-sigmoid output
  output logic                    act_valid,
  output logic signed [ACT_W-1:0] act_out,
  output logic                    act_sat,
  output logic                    act_clamped
);

  localparam int unsigned CW = (R > 1) ? $clog2(R) : 1;

  logic               accept, launch, act_busy;
  logic [CW-1:0]      cnt;
  logic signed [W-1:0] p_reg [R];
  logic signed [W-1:0] w_reg [R];

  assign in_ready = !act_busy && !launch;
  assign accept   = in_valid && in_ready;

  shift_reg #(.W(W), .DEPTH(R)) u_input_reg (
    .clk, .rst_n, .en(accept), .d(p), .q(p_reg)
  );

  shift_reg #(.W(W), .DEPTH(R)) u_weight_reg (
    .clk, .rst_n, .en(accept), .d(w), .q(w_reg)
  );

  mac_unit #(.W(W), .R(R)) u_mac (
    .p(p_reg), .w(w_reg), .a(lin_out)
  );

  // Count accepted pairs; the R-th one of a set launches the activation on
  // the next cycle, when lin_out holds the full inner product.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt    <= '0;
      launch <= 1'b0;
    end else begin
      launch <= 1'b0;
      if (accept) begin
        if (cnt == CW'(R - 1)) begin
          cnt    <= '0;
          launch <= 1'b1;
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

  tansig_activation #(
    .IN_W(2*W), .IN_FRAC(ACT_IN_FRAC), .K(K), .OUT_W(ACT_W), .OUT_FRAC(ACT_FRAC)
  ) u_act (
    .clk, .rst_n,
    .start(launch), .x_in(lin_out),
    .busy(act_busy), .done(act_valid), .y_out(act_out),
    .sat(act_sat), .clamped(act_clamped)
  );

  // A set is only launched while the activation unit is idle.
  a_launch_idle: assert property (@(posedge clk) disable iff (!rst_n) launch |-> !act_busy);

endmodule
