// tb_tansig_activation: self-checking test of the Taylor-series tan-sigmoid.
//
// Three instances are run side by side:
//   u_int : default parameters (integer argument, order 40),
//   u_k40 : argument with 16 fractional bits, order 40,
//   u_k10 : argument with 16 fractional bits, order 10,
//   u_k5  : argument with 16 fractional bits, order 5 (an odd order, whose
//           ratio exceeds 2 for large arguments and so exercises saturation).
// For every argument the expected value is worked out here in double
// precision: the argument is clamped to +/-20, the truncated series of e^x
// and e^-x are summed term by term, and the ratio (y - z)/(y + z) is
// truncated to the output format (or saturated at magnitude 2). Each result
// must lie within a few output LSBs of it; for order 40 it must also lie
// within a few LSBs of tanh(x). The sat and clamped flags and the latency
// (order + 16 clock edges from start to done for a 14-bit fraction) are checked as well.
module tb_tansig_activation;
  localparam int OUT_W = 16, OUT_FRAC = 14, TOL = 4;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [63:0] x_int = '0, x_fix = '0;

  logic busy_i, done_i, sat_i, clp_i;  logic signed [OUT_W-1:0] y_i;
  logic busy_a, done_a, sat_a, clp_a;  logic signed [OUT_W-1:0] y_a;
  logic busy_b, done_b, sat_b, clp_b;  logic signed [OUT_W-1:0] y_b;
  logic busy_c, done_c, sat_c, clp_c;  logic signed [OUT_W-1:0] y_c;

  int checks = 0, failures = 0;
  int sat_seen = 0, clamp_seen = 0;

  tansig_activation u_int (.clk, .rst_n, .start, .x_in(x_int), .busy(busy_i),
                           .done(done_i), .y_out(y_i), .sat(sat_i), .clamped(clp_i));
  tansig_activation #(.IN_FRAC(16), .K(40)) u_k40 (.clk, .rst_n, .start, .x_in(x_fix),
                           .busy(busy_a), .done(done_a), .y_out(y_a), .sat(sat_a), .clamped(clp_a));
  tansig_activation #(.IN_FRAC(16), .K(10)) u_k10 (.clk, .rst_n, .start, .x_in(x_fix),
                           .busy(busy_b), .done(done_b), .y_out(y_b), .sat(sat_b), .clamped(clp_b));
  tansig_activation #(.IN_FRAC(16), .K(5)) u_k5 (.clk, .rst_n, .start, .x_in(x_fix),
                           .busy(busy_c), .done(done_c), .y_out(y_c), .sat(sat_c), .clamped(clp_c));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected output code of the truncated-series ratio; near_edge marks a
  // ratio so close to the saturation limit that either outcome is accepted.
  function automatic int expect_code(real x, int k, output bit sat, output bit near_edge);
    real t, y, z, r, lim;
    lim = 20.0;
    if (x > lim) x = lim;
    if (x < -lim) x = -lim;
    t = 1.0; y = 1.0; z = 1.0;
    for (int n = 1; n <= k; n++) begin
      t = t * x / n;
      y = y + t;
      z = (n % 2 == 1) ? z - t : z + t;
    end
    r = (y - z) / (y + z);
    near_edge = (r > 1.999) || (r < -1.999);
    sat = (r >= 2.0) || (r <= -2.0);
    if (sat) return (r < 0) ? -((1 << (OUT_FRAC + 1)) - 1) : ((1 << (OUT_FRAC + 1)) - 1);
    return int'($rtoi(r * (1 << OUT_FRAC)));
  endfunction

  task automatic check_one(string tag, real x, int k, logic signed [OUT_W-1:0] got,
                           logic got_sat, logic got_clp, bit vs_tanh);
    bit es, edge_case;
    int e;
    real xc, d;
    e = expect_code(x, k, es, edge_case);
    checks++;
    if (!edge_case && (got_sat !== es || ((int'(got) - e) > TOL) || ((e - int'(got)) > TOL))) begin
      failures++;
      $display("%s x=%f k=%0d: got %0d sat=%0b expected %0d sat=%0b", tag, x, k, got, got_sat, e, es);
    end
    checks++;
    if (got_clp !== (x > 20.0 || x < -20.0)) begin
      failures++;
      $display("%s x=%f: clamped flag %0b", tag, x, got_clp);
    end
    if (vs_tanh) begin
      xc = (x > 20.0) ? 20.0 : (x < -20.0) ? -20.0 : x;
      checks++;
      d = real'(got) / (1 << OUT_FRAC) - $tanh(xc);
      if (d > real'(TOL) / (1 << OUT_FRAC) || -d > real'(TOL) / (1 << OUT_FRAC)) begin
        failures++;
        $display("%s x=%f: got %f, tanh %f", tag, x, real'(got) / (1 << OUT_FRAC), $tanh(xc));
      end
    end
    if (got_sat) sat_seen++;
    if (got_clp) clamp_seen++;
  endtask

  task automatic run(longint xi, longint xf);
    int cyc_i, cyc_a, cyc_b, cyc_c;
    real xr_i, xr_f;
    xr_i = real'(xi);
    xr_f = real'(xf) / 65536.0;
    @(negedge clk);
    x_int = xi; x_fix = xf; start = 1;
    @(negedge clk);
    start = 0;
    cyc_i = 0; cyc_a = 0; cyc_b = 0; cyc_c = 0;
    fork
      begin while (!done_i) begin @(negedge clk); cyc_i++; end end
      begin while (!done_a) begin @(negedge clk); cyc_a++; end end
      begin while (!done_b) begin @(negedge clk); cyc_b++; end end
      begin while (!done_c) begin @(negedge clk); cyc_c++; end end
    join
    // latency: cycles from the edge sampling start to the edge raising done
    checks += 4;
    if (cyc_i != 40 + OUT_FRAC + 2) begin failures++; $display("latency k40 int %0d", cyc_i); end
    if (cyc_a != 40 + OUT_FRAC + 2) begin failures++; $display("latency k40 %0d", cyc_a); end
    if (cyc_b != 10 + OUT_FRAC + 2) begin failures++; $display("latency k10 %0d", cyc_b); end
    if (cyc_c != 5 + OUT_FRAC + 2) begin failures++; $display("latency k5 %0d", cyc_c); end
    check_one("int", xr_i, 40, y_i, sat_i, clp_i, 1);
    check_one("k40", xr_f, 40, y_a, sat_a, clp_a, 1);
    check_one("k10", xr_f, 10, y_b, sat_b, clp_b, 0);
    check_one("k5", xr_f, 5, y_c, sat_c, clp_c, 0);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    // corner arguments
    run(0, 0);
    run(1, 65536);
    run(-1, -65536);
    run(20, 20 * 65536);
    run(-20, -20 * 65536);
    run(170, 21 * 65536);          // beyond the range: clamped
    run(-170, -30 * 65536);
    run(3, 32768);                 // 0.5
    run(-7, -1);                   // smallest negative fraction
    // a start while busy is ignored
    @(negedge clk); x_int = 5; x_fix = 0; start = 1;
    @(negedge clk); start = 0;
    @(negedge clk); x_int = -5; start = 1;
    @(negedge clk); start = 0;
    while (!done_i) @(negedge clk);
    checks++;
    if ((int'(y_i) - int'($rtoi($tanh(5.0) * (1 << OUT_FRAC)))) > TOL ||
        (int'($rtoi($tanh(5.0) * (1 << OUT_FRAC))) - int'(y_i)) > TOL) begin
      failures++;
      $display("start while busy was not ignored: %0d", y_i);
    end
    while (busy_a || busy_b || busy_c) @(negedge clk);
    // random arguments
    for (int t = 0; t < 300; t++) begin
      longint xi, xf;
      xi = longint'($urandom_range(0, 50)) - 25;
      xf = longint'($urandom_range(0, 44 * 65536)) - 22 * 65536;
      run(xi, xf);
    end
    checks++;
    if (sat_seen == 0 || clamp_seen == 0) begin
      failures++;
      $display("saturation %0d / clamp %0d never seen", sat_seen, clamp_seen);
    end
    $display("saturated results %0d, clamped arguments %0d", sat_seen, clamp_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
