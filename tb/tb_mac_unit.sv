// tb_mac_unit: self-checking test of the combinational inner product.
//
// First replays the three-step example of a 3-input neuron: inputs 7, 8, 9
// with weights 6, 7, 8 entered one after the other give 42, 98 and 170. Then
// applies random signed operands, small and full-range, and compares with a
// sum of 64-bit products computed here (wrapping at 2*W bits like the unit).
module tb_mac_unit;
  localparam int unsigned W = 32, R = 3;

  logic signed [W-1:0]   p [R];
  logic signed [W-1:0]   w [R];
  logic signed [2*W-1:0] a;
  int checks = 0, failures = 0;

  mac_unit #(.W(W), .R(R)) dut (.p, .w, .a);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input longint expected);
    #1;
    checks++;
    if (a !== expected) begin
      failures++;
      $display("got %0d expected %0d", a, expected);
    end
  endtask

  initial begin
    longint exp_sum;
    automatic int ex_p [3] = '{7, 8, 9};
    automatic int ex_w [3] = '{6, 7, 8};
    automatic longint ex_a [3] = '{42, 98, 170};
    foreach (p[i]) begin p[i] = '0; w[i] = '0; end
    check(0);
    // the shift-register example: newest operand in stage 0
    for (int s = 0; s < 3; s++) begin
      for (int i = R - 1; i > 0; i--) begin p[i] = p[i-1]; w[i] = w[i-1]; end
      p[0] = ex_p[s];
      w[0] = ex_w[s];
      check(ex_a[s]);
    end
    for (int t = 0; t < 2000; t++) begin
      exp_sum = 0;
      for (int i = 0; i < int'(R); i++) begin
        if (t < 1000) begin
          p[i] = $signed($urandom_range(0, 2000)) - 1000;
          w[i] = $signed($urandom_range(0, 2000)) - 1000;
        end else begin
          p[i] = $urandom;
          w[i] = $urandom;
        end
        exp_sum += longint'(p[i]) * longint'(w[i]);
      end
      check(exp_sum);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
