// tb_reachable_states: measures how many distinct register states the
// encoder, the decoder and the two together visit, to set the design's size
// against state counts of other implementations of the same code.
//
// The top level runs with an ideal line on 1,000,000 random bits whose
// density of 1s changes every 500 bits (from 0% to 90%), so that long runs
// of 0s and of 1s both occur; the design is also reset at random times,
// since a few joint states occur only just after reset. The register state of each part is read
// through hierarchical references and recorded in associative arrays:
//   encoder : 3 look-ahead bits, 2 mode bits, parity, last polarity (7 bits)
//   decoder : last polarity, 3 x (pulse, violation) history (7 bits)
// The expected counts (46 encoder states, 30 decoder states, 375 joint
// states) come from enumerating the registers' next-state functions from
// reset over both input values until no new state appears; random
// simulation must reach exactly those, never more. The sequence observer's
// shift register adds no state: its contents follow from the others.
module tb_reachable_states;
  import encdec_pkg::*;

  localparam int EXP_ENC   = 46;
  localparam int EXP_DEC   = 30;
  localparam int EXP_JOINT = 375;

  logic      clk = 1'b0, rst_n = 1'b0, bin = 1'b0;
  line_sym_t line_tx;
  logic      bout, non_exclusive, too_negative, too_positive, too_many_z, seq_violation;
  int checks = 0, failures = 0;

  bit seen_enc[bit [6:0]];
  bit seen_dec[bit [6:0]];
  bit seen_joint[bit [13:0]];

  encdec_top dut (
    .clk, .rst_n, .bin,
    .line_tx, .line_rx(line_tx),
    .bout,
    .non_exclusive, .too_negative, .too_positive, .too_many_z, .seq_violation
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit [6:0] enc_state();
    return {dut.u_encoder.u_detector.bit1, dut.u_encoder.u_detector.bit2,
            dut.u_encoder.u_detector.bit3, 2'(dut.u_encoder.u_sequencer.state_q),
            dut.u_encoder.u_parity.odd_q, dut.u_encoder.u_nonzero.last_plus_q};
  endfunction

  function automatic bit [6:0] dec_state();
    return {dut.u_decoder.last_plus_q, dut.u_decoder.hist_q[0],
            dut.u_decoder.hist_q[1], dut.u_decoder.hist_q[2]};
  endfunction

  initial begin
    int one_pct;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000000; t++) begin
      bit [6:0] e, d;
      if (t % 500 == 0) one_pct = 10 * int'($urandom % 10);
      // restart from reset now and then: some joint states exist only in
      // the first cycles after reset
      if (t % 20 == 0 && ($urandom % 50) == 0) begin
        rst_n = 1'b0;
        #1;
        rst_n = 1'b1;
      end
      e = enc_state();
      d = dec_state();
      seen_enc[e]          = 1'b1;
      seen_dec[d]          = 1'b1;
      seen_joint[{e, d}]   = 1'b1;
      bin = (($urandom % 100) < one_pct);
      #1;
      checks++;
      if (seq_violation || too_many_z || too_negative || too_positive || non_exclusive) begin
        failures++; $display("t=%0d observer flag raised", t);
      end
      @(negedge clk);
    end
    $display("distinct register states: encoder %0d, decoder %0d, encoder+decoder %0d",
             seen_enc.num(), seen_dec.num(), seen_joint.num());
    checks += 3;
    if (seen_enc.num() != EXP_ENC)     begin failures++; $display("encoder: expected %0d", EXP_ENC); end
    if (seen_dec.num() != EXP_DEC)     begin failures++; $display("decoder: expected %0d", EXP_DEC); end
    if (seen_joint.num() != EXP_JOINT) begin failures++; $display("joint: expected %0d", EXP_JOINT); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
