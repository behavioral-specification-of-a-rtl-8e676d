// tb_encoder: self-checking testbench of the complete encoder.
//
// Streams bits into the encoder and compares every output symbol with the
// reference model of the line code (encdec_ref_pkg). The encoder reads the
// stream as if it were preceded by three 0s and emits symbol k of that
// stream in cycle k, so the expected output of cycle k is symbol k of
// encode(000 . input). The first part replays the worked example of the
// code (inputs 0 1 0 0 0 0 1 0 0 0 0, symbols z p n z z n p z z z p) after
// a 1 1 preamble, the
// second a long random stream rich in runs of 0s. Every symbol is also
// compared with the classical ten-state Mealy machine of the encoder
// (encdec_ref_pkg::mealy_step), an independent second model. The testbench also checks
// both line requirements directly (running sum within -1..+1, at most three
// z in a row) and that exactly one of n, z, p is present each cycle.
module tb_encoder;
  import encdec_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, bin = 1'b0;
  logic minus, zero, plus;
  int checks = 0, failures = 0;

  encoder dut (.clk, .rst_n, .bin, .minus, .zero, .plus);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reset, stream x in, compare symbols 3..N-1 of the output with the
  // model (the look-ahead leaves the last three unknown), and optionally
  // compare with an expected symbol string given for the input bits.
  task automatic run_stream(bits_q x, string expect_syms, int skip);
    syms_q ref_u;
    int    got[$];
    int    acc = 0, zrun = 0;
    int    mstate = 1;
    bits_q v;
    rst_n = 1'b0;
    bin   = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    v     = with_prefix(x);
    ref_u = encode(v);
    for (int t = 0; t < x.size(); t++) begin
      int s;
      bin = x[t];
      #1;
      s = plus ? 1 : minus ? -1 : 0;
      got.push_back(s);
      checks++;
      if (int'(minus) + int'(zero) + int'(plus) != 1) begin
        failures++; $display("t=%0d not exactly one of n z p", t);
      end
      checks++;
      if (t < ref_u.size() - 3 && s != ref_u[t]) begin
        failures++;
        $display("t=%0d symbol %s expected %s", t, sym_name(s), sym_name(ref_u[t]));
      end
      // cross-check with the ten-state Mealy machine, fed d = v[t] and
      // f = four 0s from v[t] on (bin of this cycle is v[t+3])
      begin
        int ms;
        ms = mealy_step(mstate, v[t], !v[t] && !v[t+1] && !v[t+2] && !v[t+3]);
        checks++;
        if (s != ms) begin
          failures++;
          $display("t=%0d symbol %s, Mealy machine gives %s", t, sym_name(s), sym_name(ms));
        end
      end
      acc += s;
      zrun = (s == 0) ? zrun + 1 : 0;
      checks += 2;
      if (acc > 1 || acc < -1) begin failures++; $display("t=%0d running sum %0d", t, acc); end
      if (zrun > 3) begin failures++; $display("t=%0d four z in a row", t); end
      @(negedge clk);
    end
    // compare the symbols that encode the input bits with the given string
    for (int i = 0; i < expect_syms.len(); i++) begin
      checks++;
      if (sym_name(got[i+3+skip]) != expect_syms.substr(i, i)) begin
        failures++;
        $display("worked example: bit %0d encoded as %s, expected %s",
                 i + 1, sym_name(got[i+3+skip]), expect_syms.substr(i, i));
      end
    end
  endtask

  initial begin
    bits_q x;
    // worked example. It is preceded by 1 1 (sent as p n), which leaves the
    // parity even and the last polarity n, as at the start of a stream, and
    // keeps its leading 0 from joining the three 0s the encoder assumes
    // before the stream. It is followed by 1s so that its last group is
    // complete before the stream ends.
    x = '{1,1, 0,1,0,0,0,0,1,0,0,0,0, 1,1,1,1};
    run_stream(x, "zpnzznpzzzp", 2);
    // the stream 0 1 0 0 0 0 0 1 0 of the line waveform example
    x = '{1,1, 0,1,0,0,0,0,0,1,0, 1,1,1,1};
    run_stream(x, "zpnzznzpz", 2);
    // all ones: pure alternation
    x = '{};
    for (int i = 0; i < 40; i++) x.push_back(1'b1);
    run_stream(x, "pnpnpnpnpn", 0);
    // all zeros: back-to-back exceptions
    x = '{};
    for (int i = 0; i < 40; i++) x.push_back(1'b0);
    run_stream(x, "", 0);
    // random streams with different densities of 1s
    for (int r = 0; r < 6; r++) run_stream(random_bits(2000, 10 + 10 * r), "", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
