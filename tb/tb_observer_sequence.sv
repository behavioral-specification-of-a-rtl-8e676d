// tb_observer_sequence: self-checking testbench of the sequence observer.
// Drives a random bin, and a bout that is bin of six cycles earlier (0
// during the first six cycles) except for randomly injected errors. The
// observer must flag exactly the injected errors.
module tb_observer_sequence;
  logic clk = 1'b0, rst_n = 1'b0, bin = 1'b0, bout = 1'b0;
  logic violation;
  int checks = 0, failures = 0, n_err = 0;
  bit hist[$];

  observer_sequence dut (.clk, .rst_n, .bin, .bout, .violation);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    hist = '{0, 0, 0, 0, 0, 0};
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      bit err;
      bin = 1'($urandom);
      hist.push_back(bin);
      err  = (($urandom % 20) == 0);
      bout = hist[hist.size()-7] ^ err;
      #1;
      checks++;
      if (violation !== err) begin failures++; $display("t=%0d violation=%b expected %b", t, violation, err); end
      if (err) n_err++;
      @(negedge clk);
    end
    checks++;
    if (n_err == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
