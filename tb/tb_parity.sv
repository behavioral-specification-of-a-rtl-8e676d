// tb_parity: self-checking testbench of the parity manager.
// Drives random plus_or_minus pulses and checks that even reports whether
// the number of pulses in earlier cycles is even (true after reset).
module tb_parity;
  logic clk = 1'b0, rst_n = 1'b0, plus_or_minus = 1'b0;
  logic even;
  int checks = 0, failures = 0;
  int count = 0;

  parity dut (.clk, .rst_n, .plus_or_minus, .even);

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
      @(negedge clk);
      plus_or_minus = 1'($urandom);
      #1;
      checks++;
      if (even !== (count % 2 == 0)) begin
        failures++; $display("t=%0d even=%b after %0d non-zero symbols", t, even, count);
      end
      if (plus_or_minus) count++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
