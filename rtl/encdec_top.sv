// encdec_top: encoder, decoder and safety observers of the three-level
// binary line code, composed in parallel.
//
// The encoder turns the bit stream Bin into one line symbol per instant
// (line_tx). The analog transmitter, wire and receiver are outside this
// design: line_tx is the symbol to drive and line_rx the symbol sensed at
// the far end; connecting line_rx to line_tx models an ideal wire. The
// decoder turns line_rx back into Bout.
//
// Four observers run alongside and only watch:
//   observer_exclusion : line_tx is exactly one of n, z, p    -> non_exclusive
//   observer_r1        : running line voltage within -U..+U  -> too_negative / too_positive
//   observer_r2        : never four z in a row               -> too_many_z
//   observer_sequence  : Bout equals Bin of 6 instants ago   -> seq_violation
// With an ideal wire none of the four flags is ever present.
//
// The composition follows the original verification set-up; bringing
// the line out as line_tx/line_rx and running all observers at once is this
// design's choice.
//
// Interface: clk, rst_n (asynchronous, active low), bin; line_tx out,
// line_rx in (encdec_pkg::line_sym_t); bout; the observer flags.
// Timing: line_tx in instant k encodes Bin of instant k-3; bout in instant
// k equals Bin of instant k-6 (for line_rx = line_tx).
module encdec_top
  import encdec_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      bin,
  output line_sym_t line_tx,
  input  line_sym_t line_rx,
  output logic      bout,
  output logic      non_exclusive,
  output logic      too_negative,
  output logic      too_positive,
  output logic      too_many_z,
  output logic      seq_violation
);

  encoder u_encoder (
    .clk, .rst_n,
    .bin,
    .minus (line_tx.minus),
    .zero  (line_tx.zero),
    .plus  (line_tx.plus)
  );

  decoder u_decoder (
    .clk, .rst_n,
    .minus (line_rx.minus),
    .zero  (line_rx.zero),
    .plus  (line_rx.plus),
    .bout
  );

  observer_exclusion u_obs_exclusion (
    .n (line_tx.minus),
    .z (line_tx.zero),
    .p (line_tx.plus),
    .non_exclusive
  );

  observer_r1 u_obs_r1 (
    .clk, .rst_n,
    .n (line_tx.minus),
    .p (line_tx.plus),
    .too_negative,
    .too_positive
  );

  observer_r2 u_obs_r2 (
    .clk, .rst_n,
    .n (line_tx.minus),
    .z (line_tx.zero),
    .p (line_tx.plus),
    .too_many_z
  );

  observer_sequence #(.DEPTH(CODEC_LATENCY)) u_obs_sequence (
    .clk, .rst_n,
    .bin,
    .bout,
    .violation (seq_violation)
  );

endmodule
