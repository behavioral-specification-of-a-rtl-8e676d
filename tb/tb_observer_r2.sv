// tb_observer_r2: self-checking testbench of the requirement-2 observer.
// Drives random symbols biased towards z and counts consecutive z. The
// observer must report too_many_z exactly in the instants that end a run of
// four or more z, including a run that starts in the first instant after
// reset. Runs of exactly three z (allowed) and of four or more must occur.
module tb_observer_r2;
  logic clk = 1'b0, rst_n = 1'b0, n = 1'b0, z = 1'b0, p = 1'b0;
  logic too_many_z;
  int checks = 0, failures = 0, n_bad = 0, n_three = 0;

  observer_r2 dut (.clk, .rst_n, .n, .z, .p, .too_many_z);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int run = 0; run < 50; run++) begin
      int zrun;
      zrun = 0;
      rst_n = 1'b0; n = 1'b0; z = 1'b0; p = 1'b0;
      repeat (2) @(negedge clk);
      rst_n = 1'b1;
      for (int t = 0; t < 200; t++) begin
        int r;
        r = $urandom % 10;
        z = (r < 7);
        n = (r == 7 || r == 8);
        p = (r == 9);
        if (z) zrun++;
        else begin
          if (zrun == 3) n_three++;
          zrun = 0;
        end
        #1;
        checks++;
        if (too_many_z !== (zrun >= 4)) begin
          failures++; $display("run %0d t=%0d zrun=%0d too_many_z=%b", run, t, zrun, too_many_z);
        end
        if (zrun == 4) n_bad++;
        @(negedge clk);
      end
    end
    checks++;
    if (n_bad == 0 || n_three == 0) failures++;
    $display("runs of three z=%0d, runs of four or more=%0d", n_three, n_bad);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
