// encdec_pkg: types and constants shared by the three-level line encoder,
// its decoder and the safety observers.
//
// Every signal of the design is a "pure" signal: one bit, 1 when the signal
// is present in the current instant (clock cycle), 0 when it is absent. The
// symbol sent on the line is one of n (-U), z (0) or p (+U); it is carried as
// three pure signals Minus, Zero, Plus of which exactly one is present in
// each instant.
package encdec_pkg;

  // One line symbol as three pure signals (exactly one present per instant).
  typedef struct packed {
    logic minus;  // n : -U on the line
    logic zero;   // z :  0 on the line
    logic plus;   // p : +U on the line
  } line_sym_t;

  // Length of the run of zeros that is replaced by the P z z V pattern.
  localparam int unsigned ZERO_RUN      = 4;
  // Look-ahead the encoder needs to see a whole run: bits are encoded
  // ZERO_RUN-1 instants after they arrive.
  localparam int unsigned ENC_DELAY     = ZERO_RUN - 1;
  // The decoder needs the same look-ahead to recognise the violation that
  // ends a run.
  localparam int unsigned DEC_DELAY     = ZERO_RUN - 1;
  // End-to-end latency from Bin to Bout.
  localparam int unsigned CODEC_LATENCY = ENC_DELAY + DEC_DELAY;

  localparam line_sym_t SYM_N = '{minus: 1'b1, zero: 1'b0, plus: 1'b0};
  localparam line_sym_t SYM_Z = '{minus: 1'b0, zero: 1'b1, plus: 1'b0};
  localparam line_sym_t SYM_P = '{minus: 1'b0, zero: 1'b0, plus: 1'b1};

endpackage
