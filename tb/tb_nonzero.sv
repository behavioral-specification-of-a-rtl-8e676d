// tb_nonzero: self-checking testbench of the Plus/Minus output manager.
// Drives random requests (none, Alternation or Violation) and checks the
// emitted polarity against a model holding the last polarity as +1/-1,
// starting from -1 (n). Both request kinds and both polarities must occur.
module tb_nonzero;
  logic clk = 1'b0, rst_n = 1'b0;
  logic alternation = 1'b0, violation = 1'b0;
  logic plus, minus, plus_or_minus;
  int checks = 0, failures = 0;
  int last = -1;
  int n_alt = 0, n_viol = 0;

  nonzero dut (.clk, .rst_n, .alternation, .violation, .plus, .minus, .plus_or_minus);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      int req, expv;
      @(negedge clk);
      req = $urandom % 3;
      alternation = (req == 1);
      violation   = (req == 2);
      #1;
      expv = (req == 1) ? -last : (req == 2) ? last : 0;
      checks += 3;
      if (plus !== (expv > 0)) begin failures++; $display("t=%0d plus=%b exp %0d", t, plus, expv); end
      if (minus !== (expv < 0)) begin failures++; $display("t=%0d minus=%b exp %0d", t, minus, expv); end
      if (plus_or_minus !== (expv != 0)) begin failures++; $display("t=%0d plus_or_minus wrong", t); end
      if (expv != 0) last = expv;
      if (req == 1) n_alt++;
      if (req == 2) n_viol++;
    end
    checks++;
    if (n_alt == 0 || n_viol == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
