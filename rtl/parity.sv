// parity: parity manager (the PARITY agent of the encoder).
//
// Counts, modulo 2, the non-zero symbols (p or n) the encoder has put on the
// line. Even is present while that count is even. It is read by the
// sequencer in the first instant of an exception to choose the P symbol, and
// must then describe the symbols sent before that instant, so Even is taken
// from the register alone: a non-zero symbol sent in instant k changes Even
// from instant k+1 on. This also keeps the loop sequencer -> nonzero ->
// parity -> sequencer free of any combinational path.
//
// Only the agent's job is given by the original description; the single
// toggle register, the PlusOrMinus input and the Even output are this
// design's reading of it.
//
// Interface: plus_or_minus in (present when a p or n is sent this instant);
// even out (registered). Reset state: even, as for the empty sequence.
module parity (
  input  logic clk,
  input  logic rst_n,
  input  logic plus_or_minus,
  output logic even
);

  logic odd_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             odd_q <= 1'b0;
    else if (plus_or_minus) odd_q <= !odd_q;
  end

  assign even = !odd_q;

endmodule
