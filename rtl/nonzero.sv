// nonzero: output manager deciding between Plus and Minus (the NONZERO
// agent of the encoder).
//
// It remembers the polarity of the last non-zero symbol sent. When the
// sequencer asks for an Alternation it emits the opposite polarity; when it
// asks for a Violation it repeats the same polarity. Whenever it emits Plus
// or Minus it also emits PlusOrMinus for the parity manager. Before the
// first non-zero symbol the remembered polarity is n, so the first 1 is sent
// as p.
//
// Only the agent's job is given by the original description; the
// polarity register and the PlusOrMinus output are this design's choice.
//
// Interface: alternation, violation in (at most one present); plus, minus,
// plus_or_minus out, combinational from the inputs and the polarity
// register, which is updated at the clock edge ending the instant.
module nonzero (
  input  logic clk,
  input  logic rst_n,
  input  logic alternation,
  input  logic violation,
  output logic plus,
  output logic minus,
  output logic plus_or_minus
);

  logic last_plus_q;  // 1: last non-zero symbol was p, 0: it was n

  always_comb begin
    plus  = (alternation && !last_plus_q) || (violation && last_plus_q);
    minus = (alternation &&  last_plus_q) || (violation && !last_plus_q);
    plus_or_minus = alternation || violation;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)             last_plus_q <= 1'b0;
    else if (plus_or_minus) last_plus_q <= plus;
  end

endmodule
