// tb_sequencer: self-checking testbench of the NORMAL/EXCEPTION sequencer.
// Drives random delayed_x, four_zeros and even, and checks the emitted
// signal (exactly one of zero, alternation, violation) against a model that
// counts down the four instants P z z V of an exception. Also checks that
// an exception lasts exactly four instants, and that each case happens:
// exception with even and odd parity, FourZeros ignored inside an exception,
// and a new exception starting in the instant right after one ends.
module tb_sequencer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic delayed_x = 1'b0, four_zeros = 1'b0, even = 1'b1;
  logic zero, alternation, violation;
  int checks = 0, failures = 0;
  int left = 0;            // instants of the exception still to come
  int exc_start = 0, exc_len_ok = 0;
  int n_exc_even = 0, n_exc_odd = 0, n_fz_ignored = 0, n_back_to_back = 0;
  bit prev_was_v = 1'b0;

  sequencer dut (.clk, .rst_n, .delayed_x, .four_zeros, .even,
                 .zero, .alternation, .violation);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      int expv;  // 0: zero, 1: alternation, 2: violation
      @(negedge clk);
      delayed_x  = 1'($urandom);
      four_zeros = (($urandom % 3) == 0);
      even       = 1'($urandom);
      #1;
      if (left == 0) begin
        if (four_zeros) begin
          expv = even ? 0 : 1;
          left = 3;
          exc_start = t;
          if (even) n_exc_even++; else n_exc_odd++;
          if (prev_was_v) n_back_to_back++;
        end else begin
          expv = delayed_x ? 1 : 0;
        end
        prev_was_v = 1'b0;
      end else begin
        if (four_zeros) n_fz_ignored++;
        expv = (left == 1) ? 2 : 0;
        if (left == 1) begin
          checks++;
          if (t - exc_start != 3) begin failures++; $display("exception length wrong"); end
        end
        prev_was_v = (left == 1);
        left--;
      end
      checks++;
      if ({zero, alternation, violation} !== {expv == 0, expv == 1, expv == 2}) begin
        failures++;
        $display("t=%0d got z=%b a=%b v=%b expected %0d", t, zero, alternation, violation, expv);
      end
    end
    checks++;
    if (n_exc_even == 0 || n_exc_odd == 0 || n_fz_ignored == 0 || n_back_to_back == 0) begin
      failures++;
      $display("case not exercised: even=%0d odd=%0d ignored=%0d back_to_back=%0d",
               n_exc_even, n_exc_odd, n_fz_ignored, n_back_to_back);
    end
    $display("exceptions even=%0d odd=%0d, FourZeros ignored=%0d, back-to-back=%0d",
             n_exc_even, n_exc_odd, n_fz_ignored, n_back_to_back);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
