// tb_detector: self-checking testbench of the four-zeros detector.
// Drives a random stream rich in runs of 0s and checks, every cycle, that
// delayed_x is the input of three cycles earlier (0 before the first input)
// and that four_zeros is present exactly when the current input and the
// three before it are all 0.
module tb_detector;
  logic clk = 1'b0, rst_n = 1'b0, bin = 1'b0;
  logic delayed_x, four_zeros;
  int checks = 0, failures = 0, fz_seen = 0;
  bit hist[$];

  detector dut (.clk, .rst_n, .bin, .delayed_x, .four_zeros);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '{1'b0, 1'b0, 1'b0};  // cleared register after reset
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      bit exp_dx, exp_fz;
      @(negedge clk);
      bin = (($urandom % 100) < 30);
      hist.push_back(bin);
      #1;
      exp_dx = hist[hist.size()-4];
      exp_fz = !(hist[hist.size()-1] || hist[hist.size()-2] ||
                 hist[hist.size()-3] || hist[hist.size()-4]);
      checks += 2;
      if (delayed_x !== exp_dx) begin
        failures++; $display("t=%0d delayed_x=%b expected %b", t, delayed_x, exp_dx);
      end
      if (four_zeros !== exp_fz) begin
        failures++; $display("t=%0d four_zeros=%b expected %b", t, four_zeros, exp_fz);
      end
      if (exp_fz) fz_seen++;
    end
    checks++;
    if (fz_seen == 0) begin failures++; $display("no run of four 0s was exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
