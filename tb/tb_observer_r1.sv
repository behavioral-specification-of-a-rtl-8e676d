// tb_observer_r1: self-checking testbench of the requirement-1 observer.
// Drives random symbol sequences and keeps the running sum of the line
// voltage (n = -1, z = 0, p = +1). The observer must report too_negative
// from the first instant the sum reaches -2 and too_positive from the first
// instant it reaches +2, and keep reporting it; it must report nothing while
// the sum has stayed within -1..+1. Both violations must occur.
module tb_observer_r1;
  logic clk = 1'b0, rst_n = 1'b0, n = 1'b0, p = 1'b0;
  logic too_negative, too_positive;
  int checks = 0, failures = 0, n_neg = 0, n_pos = 0;

  observer_r1 dut (.clk, .rst_n, .n, .p, .too_negative, .too_positive);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 200; run++) begin
      int acc;
      bit neg, pos;
      acc = 0; neg = 1'b0; pos = 1'b0;
      rst_n = 1'b0; n = 1'b0; p = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      for (int t = 0; t < 40; t++) begin
        int s;
        s = int'($urandom % 3) - 1;
        n = (s < 0);
        p = (s > 0);
        if (!neg && !pos) acc += s;
        if (acc < -1) neg = 1'b1;
        if (acc > 1)  pos = 1'b1;
        #1;
        checks += 2;
        if (too_negative !== neg) begin failures++; $display("run %0d t=%0d too_negative=%b", run, t, too_negative); end
        if (too_positive !== pos) begin failures++; $display("run %0d t=%0d too_positive=%b", run, t, too_positive); end
        @(negedge clk);
      end
      if (neg) n_neg++;
      if (pos) n_pos++;
    end
    checks++;
    if (n_neg == 0 || n_pos == 0) failures++;
    $display("runs ending too negative=%0d, too positive=%0d", n_neg, n_pos);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
