// tb_neuron: end-to-end test of the neuron at its default parameters
// (32-bit operands, 3 inputs, Taylor order 40).
//
// It first enters the three-step example (inputs 7, 8, 9 with weights 6, 7, 8,
// giving linear outputs 42, 98 and 170) and then random small signed operands
// with random gaps in in_valid. The testbench keeps its own copy of the last
// three accepted pairs: every cycle lin_out must equal their inner product,
// and every activation result must match tanh of the inner product of the set
// that launched it (clamped to +/-20) within a few output LSBs, with the clamp
// flag set exactly when the argument was out of range. The latency from the
// edge accepting the last pair of a set to the result is checked, and the
// test counts stalls (in_valid while in_ready is low), clamped arguments and
// completed sets, failing if any of them never occurred.
module tb_neuron;
  localparam int W = 32, R = 3, K = 40, ACT_W = 16, ACT_FRAC = 14, TOL = 4;
  localparam int N_SETS = 80;
  // rising edges from the one accepting a set's last pair to the one that
  // samples act_valid high: K + ACT_FRAC + 3 to raise it, plus the sample
  localparam longint LAT = longint'(K) + longint'(ACT_FRAC) + 4;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready;
  logic signed [W-1:0] p = '0, w = '0;
  logic signed [2*W-1:0] lin_out;
  logic act_valid, act_sat, act_clamped;
  logic signed [ACT_W-1:0] act_out;

  int checks = 0, failures = 0;
  int stalls = 0, clamps = 0, sets_done = 0, n_acc = 0;
  longint cycle = 0, accept_cycle = 0;
  longint model_p [R], model_w [R];
  longint pending_x = 0;

  neuron dut (.clk, .rst_n, .in_valid, .in_ready, .p, .w, .lin_out,
              .act_valid, .act_out, .act_sat, .act_clamped);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint dot();
    longint s = 0;
    for (int i = 0; i < R; i++) s += model_p[i] * model_w[i];
    return s;
  endfunction

  // Sample the handshake and the results at each rising edge.
  always @(posedge clk) begin
    if (rst_n) begin
      cycle++;
      if (in_valid && !in_ready) stalls++;
      if (act_valid) begin
        real xr, d;
        int exp_code;
        xr = (pending_x > 20) ? 20.0 : (pending_x < -20) ? -20.0 : real'(pending_x);
        exp_code = int'($rtoi($tanh(xr) * (1 << ACT_FRAC)));
        d = real'(int'(act_out) - exp_code);
        checks += 3;
        if (d > TOL || -d > TOL) begin
          failures++;
          $display("set %0d: x=%0d act_out=%0d expected %0d", sets_done, pending_x, act_out, exp_code);
        end
        if (act_clamped !== (pending_x > 20 || pending_x < -20) || act_sat) begin
          failures++;
          $display("set %0d: x=%0d clamped=%0b sat=%0b", sets_done, pending_x, act_clamped, act_sat);
        end
        if (cycle - accept_cycle != LAT) begin
          failures++;
          $display("set %0d: latency %0d", sets_done, cycle - accept_cycle);
        end
        if (act_clamped) clamps++;
        sets_done++;
      end
      if (in_valid && in_ready) begin
        for (int i = R - 1; i > 0; i--) begin model_p[i] = model_p[i-1]; model_w[i] = model_w[i-1]; end
        model_p[0] = longint'(p);
        model_w[0] = longint'(w);
        n_acc++;
        if (n_acc % R == 0) begin
          pending_x = dot();
          accept_cycle = cycle;
        end
      end
    end
  end

  // The linear output must always be the inner product of the last R pairs.
  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (lin_out !== dot()) begin
        failures++;
        $display("cycle %0d: lin_out %0d expected %0d", cycle, lin_out, dot());
      end
    end
  end

  initial begin
    automatic int ex_p [3] = '{7, 8, 9};
    automatic int ex_w [3] = '{6, 7, 8};
    automatic longint ex_a [3] = '{42, 98, 170};
    foreach (model_p[i]) begin model_p[i] = 0; model_w[i] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // the three-step example, one pair per cycle
    for (int s = 0; s < 3; s++) begin
      in_valid = 1; p = ex_p[s]; w = ex_w[s];
      @(negedge clk);
      checks++;
      if (lin_out !== ex_a[s]) begin
        failures++;
        $display("example step %0d: lin_out %0d expected %0d", s, lin_out, ex_a[s]);
      end
    end
    // random operands; in_valid stays up while stalled
    while (sets_done < N_SETS) begin
      if (!(in_valid && !in_ready)) begin
        in_valid = ($urandom_range(0, 3) != 0);
        p = $signed($urandom_range(0, 8)) - 4;
        w = $signed($urandom_range(0, 8)) - 4;
      end
      @(negedge clk);
    end
    in_valid = 0;
    checks++;
    if (stalls == 0 || clamps == 0 || clamps == sets_done) begin
      failures++;
      $display("mechanism missing: stalls %0d clamps %0d sets %0d", stalls, clamps, sets_done);
    end
    $display("sets %0d, stalled cycles %0d, clamped arguments %0d", sets_done, stalls, clamps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
