// tb_observer_exclusion: self-checking testbench of the exclusion observer.
// Applies all eight combinations of n, z, p and checks that non_exclusive
// is absent exactly for the three combinations with one signal present.
module tb_observer_exclusion;
  logic n, z, p, non_exclusive;
  int checks = 0, failures = 0;

  observer_exclusion dut (.n, .z, .p, .non_exclusive);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 8; c++) begin
      int ones;
      {n, z, p} = 3'(c);
      #1;
      ones = int'(n) + int'(z) + int'(p);
      checks++;
      if (non_exclusive !== (ones != 1)) begin
        failures++; $display("n=%b z=%b p=%b non_exclusive=%b", n, z, p, non_exclusive);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
