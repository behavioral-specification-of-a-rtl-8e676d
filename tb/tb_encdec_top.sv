// tb_encdec_top: end-to-end testbench of the encoder/decoder pair with its
// safety observers, at the design's default parameters.
//
// Part 1 connects the line ideally (line_rx = line_tx) and streams several
// bit sequences through: the worked example of the code and the line
// waveform example (each after a 1 1 preamble, see tb_encoder), all 1s, all
// 0s, and random streams with densities of 1s from 5% to 60%. In every
// cycle it checks:
//   - line_tx against the reference model (3 cycles of encoder latency),
//   - bout against bin of 6 cycles earlier (end-to-end latency),
//   - that none of the four observers raises its flag.
// It counts the mechanisms of the code and fails if one never happened:
// alternation of a 1, exception with even parity (P = z), exception with
// odd parity (P non-zero), FourZeros ignored inside an exception, an
// exception starting right after another, and a non-zero P decoded as 0.
//
// Part 2 corrupts single symbols on the line (a 1 sent as p or n received
// as z) and checks that the sequence observer flags the damage.
module tb_encdec_top;
  import encdec_pkg::*;
  import encdec_ref_pkg::*;

  logic      clk = 1'b0, rst_n = 1'b0, bin = 1'b0;
  line_sym_t line_tx, line_rx;
  logic      bout, non_exclusive, too_negative, too_positive, too_many_z, seq_violation;
  logic      corrupt = 1'b0;

  int checks = 0, failures = 0;
  int n_alt = 0, n_exc_even = 0, n_exc_odd = 0, n_fz_ignored = 0;
  int n_back_to_back = 0, n_p_decoded = 0, n_injected = 0, n_detected = 0;

  // the line: ideal, or with the symbol replaced by z while corrupt is set
  assign line_rx = corrupt ? SYM_Z : line_tx;

  encdec_top dut (
    .clk, .rst_n, .bin,
    .line_tx, .line_rx,
    .bout,
    .non_exclusive, .too_negative, .too_positive, .too_many_z, .seq_violation
  );

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sym_val(line_sym_t s);
    return s.plus ? 1 : s.minus ? -1 : 0;
  endfunction

  task automatic do_reset();
    rst_n = 1'b0;
    bin   = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Part 1: stream x through an ideal line and check everything.
  task automatic run_stream(bits_q x);
    bits_q v;
    syms_q u;
    int    exc_left = 0;
    bit    prev_exc_end = 1'b0;
    do_reset();
    v = with_prefix(x);
    u = encode(v);
    for (int t = 0; t < x.size(); t++) begin
      bin = x[t];
      #1;
      // encoder output against the model
      if (t < u.size() - 3) begin
        checks++;
        if (sym_val(line_tx) != u[t]) begin
          failures++;
          $display("t=%0d line_tx=%s expected %s", t, sym_name(sym_val(line_tx)), sym_name(u[t]));
        end
      end
      // end-to-end: bout is bin of 6 cycles earlier (v holds three 0s ahead of x)
      checks++;
      if (bout !== ((t >= CODEC_LATENCY) ? x[t-CODEC_LATENCY] : 1'b0)) begin
        failures++; $display("t=%0d bout=%b", t, bout);
      end
      // observers stay silent
      checks++;
      if (non_exclusive || too_negative || too_positive || too_many_z || seq_violation) begin
        failures++;
        $display("t=%0d observer flag: excl=%b neg=%b pos=%b z=%b seq=%b", t,
                 non_exclusive, too_negative, too_positive, too_many_z, seq_violation);
      end
      // mechanism counts, from the reference stream
      if (exc_left == 0) begin
        if (t + 3 < v.size() && !v[t] && !v[t+1] && !v[t+2] && !v[t+3] && t < u.size() - 3) begin
          if (u[t] == 0) n_exc_even++; else n_exc_odd++;
          if (prev_exc_end) n_back_to_back++;
          if (u[t] != 0 && t >= 3) n_p_decoded++;
          exc_left = 3;
        end else if (v[t]) n_alt++;
        prev_exc_end = 1'b0;
      end else begin
        if (t + 3 < v.size() && !v[t] && !v[t+1] && !v[t+2] && !v[t+3]) n_fz_ignored++;
        prev_exc_end = (exc_left == 1);
        exc_left--;
      end
      @(negedge clk);
    end
  endtask

  // Part 2: corrupt one symbol that carries a 1 and expect seq_violation
  // when the decoder delivers that bit.
  task automatic run_fault();
    bits_q x;
    bit    seen = 1'b0;
    x = random_bits(60, 50);
    x[30] = 1'b1; x[29] = 1'b1;  // bit 30 is a plain alternation
    do_reset();
    for (int t = 0; t < x.size(); t++) begin
      bin = x[t];
      corrupt = (t == 30 + ENC_DELAY);
      #1;
      if (seq_violation) seen = 1'b1;
      @(negedge clk);
    end
    corrupt = 1'b0;
    n_injected++;
    checks++;
    if (seen) n_detected++;
    else begin failures++; $display("corrupted symbol not detected"); end
  endtask

  initial begin
    bits_q x;
    run_stream('{1,1, 0,1,0,0,0,0,1,0,0,0,0, 1,1,1,1});
    run_stream('{1,1, 0,1,0,0,0,0,0,1,0, 1,1,1,1});
    x = '{};
    for (int i = 0; i < 64; i++) x.push_back(1'b1);
    run_stream(x);
    x = '{};
    for (int i = 0; i < 64; i++) x.push_back(1'b0);
    run_stream(x);
    run_stream(random_bits(4000, 5));
    for (int r = 1; r <= 6; r++) run_stream(random_bits(4000, 10 * r));
    for (int f = 0; f < 20; f++) run_fault();

    checks++;
    if (n_alt == 0 || n_exc_even == 0 || n_exc_odd == 0 || n_fz_ignored == 0 ||
        n_back_to_back == 0 || n_p_decoded == 0 || n_detected == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    $display("alternations=%0d exceptions(P=z)=%0d exceptions(P non-zero)=%0d",
             n_alt, n_exc_even, n_exc_odd);
    $display("FourZeros ignored in exception=%0d back-to-back exceptions=%0d non-zero P decoded=%0d",
             n_fz_ignored, n_back_to_back, n_p_decoded);
    $display("line faults injected=%0d detected=%0d", n_injected, n_detected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
