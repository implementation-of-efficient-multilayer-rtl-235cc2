// tb_tansig_k_sweep: the order comparison of the tan-sigmoid approximation.
//
// Three activation units of Taylor order 10, 20 and 40 are swept over the
// arguments -20 to +20 in steps of 1/4. Each result is checked against the
// truncated-series ratio of the same order computed here in double precision,
// and the largest deviation from the true tanh is recorded per order. The
// sweep passes when the deviation shrinks as the order grows and order 40
// stays within a few output LSBs of tanh over the whole range.
module tb_tansig_k_sweep;
  localparam int OUT_FRAC = 14, TOL = 4;

  logic clk = 0, rst_n = 0, start = 0;
  logic signed [63:0] x_fix = '0;
  logic [2:0] busy, done, sat, clp;
  logic signed [15:0] y [3];

  int checks = 0, failures = 0;
  real max_dev [3] = '{0.0, 0.0, 0.0};
  localparam int ORDERS [3] = '{10, 20, 40};

  tansig_activation #(.IN_FRAC(16), .K(10)) u_k10 (.clk, .rst_n, .start, .x_in(x_fix),
      .busy(busy[0]), .done(done[0]), .y_out(y[0]), .sat(sat[0]), .clamped(clp[0]));
  tansig_activation #(.IN_FRAC(16), .K(20)) u_k20 (.clk, .rst_n, .start, .x_in(x_fix),
      .busy(busy[1]), .done(done[1]), .y_out(y[1]), .sat(sat[1]), .clamped(clp[1]));
  tansig_activation #(.IN_FRAC(16), .K(40)) u_k40 (.clk, .rst_n, .start, .x_in(x_fix),
      .busy(busy[2]), .done(done[2]), .y_out(y[2]), .sat(sat[2]), .clamped(clp[2]));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real series_ratio(real x, int k);
    real t = 1.0, ys = 1.0, zs = 1.0;
    for (int n = 1; n <= k; n++) begin
      t = t * x / n;
      ys += t;
      zs = (n % 2 == 1) ? zs - t : zs + t;
    end
    return (ys - zs) / (ys + zs);
  endfunction

  initial begin
    real x, got, d;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int q = -80; q <= 80; q++) begin
      x = q / 4.0;
      x_fix = longint'(q) * 16384;
      start = 1;
      @(negedge clk);
      start = 0;
      while (busy != 0) @(negedge clk);
      for (int i = 0; i < 3; i++) begin
        got = real'(y[i]) / (1 << OUT_FRAC);
        d = got - series_ratio(x, ORDERS[i]);
        checks++;
        if (d > real'(TOL) / (1 << OUT_FRAC) || -d > real'(TOL) / (1 << OUT_FRAC)) begin
          failures++;
          $display("k=%0d x=%f: got %f, series %f", ORDERS[i], x, got, series_ratio(x, ORDERS[i]));
        end
        d = got - $tanh(x);
        if (d < 0) d = -d;
        if (d > max_dev[i]) max_dev[i] = d;
      end
    end
    for (int i = 0; i < 3; i++)
      $display("order %0d: largest deviation from tanh over [-20, 20] = %f", ORDERS[i], max_dev[i]);
    checks++;
    if (!(max_dev[0] > max_dev[1] && max_dev[1] > max_dev[2] &&
          max_dev[2] <= real'(TOL) / (1 << OUT_FRAC))) begin
      failures++;
      $display("deviation does not fall with the order as expected");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
