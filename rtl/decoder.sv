// decoder: three-level line code back to a binary stream (the DECODER).
//
// A received symbol is a violation when it is non-zero and has the same
// polarity as the previous non-zero symbol. Violations only occur as the V
// that closes a replaced run of four 0s (P z z V). A symbol therefore
// decodes to 1 exactly when it is non-zero, is not itself a violation, and
// the symbol three instants later is not a violation (which would make it
// the P of a run). Zero symbols decode to 0.
//
// The decoder classifies each incoming symbol on arrival (non-zero? violation
// against the remembered last polarity?), keeps the last three
// classifications in a shift register, and decides the bit that arrived
// three instants ago using the classification of the symbol arriving now.
//
// The original description gives only the decoder's job and its 3-instant
// delay; the decoding rule and its structure are this design's own.
//
// Interface: minus, zero, plus in (one line symbol per instant); bout out,
// combinational from the inputs and the registers. Timing: bout in instant k
// is the bit carried by the symbol of instant k-3, so an encoder feeding it
// directly gives Bin back 6 instants later. After reset the history holds z
// symbols and the last polarity is n, matching the encoder's reset state.
// A zero symbol, or an illegal input with no or several signals present
// other than exactly one of minus/plus, is read as z.
module decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic minus,
  input  logic zero,
  input  logic plus,
  output logic bout
);

  typedef struct packed {
    logic nonzero;    // symbol was p or n
    logic violation;  // symbol repeated the last non-zero polarity
  } sym_class_t;

  localparam int unsigned DEPTH = encdec_pkg::DEC_DELAY;

  logic       last_plus_q;          // polarity of the last non-zero symbol
  sym_class_t hist_q [DEPTH];       // hist_q[i]: class of the symbol i+1 instants ago
  sym_class_t now_c;
  logic       in_plus, in_minus;

  always_comb begin
    // exactly one of the three must be present for a non-zero symbol
    in_plus  = plus  && !minus && !zero;
    in_minus = minus && !plus  && !zero;
    now_c.nonzero   = in_plus || in_minus;
    now_c.violation = (in_plus && last_plus_q) || (in_minus && !last_plus_q);
    bout = hist_q[DEPTH-1].nonzero && !hist_q[DEPTH-1].violation
           && !now_c.violation;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last_plus_q <= 1'b0;
      for (int i = 0; i < DEPTH; i++) hist_q[i] <= '0;
    end else begin
      if (now_c.nonzero) last_plus_q <= in_plus;
      hist_q[0] <= now_c;
      for (int i = 1; i < DEPTH; i++) hist_q[i] <= hist_q[i-1];
    end
  end

endmodule
