// tb_sc_delay: self-checking testbench of the one-instant delay.
// Drives random values and checks that q equals d of the previous cycle,
// and that q is 0 during and right after reset.
module tb_sc_delay;
  logic clk = 1'b0, rst_n = 1'b0, d = 1'b0, q;
  int checks = 0, failures = 0;
  logic prev_d;

  sc_delay dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 1'b1;
    repeat (2) @(negedge clk);
    checks++; if (q !== 1'b0) begin failures++; $display("q not cleared by reset"); end
    rst_n = 1'b1;
    prev_d = d;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      checks++;
      if (q !== prev_d) begin failures++; $display("t=%0d q=%b expected %b", t, q, prev_d); end
      d = 1'($urandom);
      prev_d = d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
