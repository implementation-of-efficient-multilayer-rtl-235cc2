// tb_shift_reg: self-checking test of the operand shift register.
//
// Drives random words with a random enable for a few hundred cycles and keeps
// its own model of the last DEPTH accepted words (newest first). Every cycle
// all stages are compared with the model; the synchronous clear is checked at
// the start and again in the middle of the run. A watchdog ends the run.
module tb_shift_reg;
  localparam int unsigned W = 32, DEPTH = 3;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [W-1:0] d = '0;
  logic signed [W-1:0] q [DEPTH];
  logic signed [W-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  shift_reg #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst_n, .en, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    for (int i = 0; i < int'(DEPTH); i++) begin
      checks++;
      if (q[i] !== model[i]) begin
        failures++;
        $display("stage %0d: got %0d expected %0d", i, q[i], model[i]);
      end
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    compare();
    for (int cyc = 0; cyc < 400; cyc++) begin
      en = ($urandom_range(0, 3) != 0);
      d  = $urandom;
      if (cyc == 200) rst_n = 0;
      @(posedge clk);
      if (!rst_n) begin
        foreach (model[i]) model[i] = '0;
      end else if (en) begin
        for (int i = DEPTH - 1; i > 0; i--) model[i] = model[i-1];
        model[0] = d;
      end
      #1 rst_n = 1;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
