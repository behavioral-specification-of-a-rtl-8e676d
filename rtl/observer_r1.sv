// observer_r1: safety observer for requirement 1, the accumulated line
// voltage stays within -U..+U at every instant.
//
// A five-state machine follows the running sum of the symbols: it starts in
// 0, moves one step down on n and one step up on p, and z leaves it where it
// is. A step below -U ends in TooNegative, a step above +U in TooPositive;
// both are final and are never left. The observer only watches the line and
// changes nothing in the design.
//
// The states and the final states follow the original description of
// the observer; the flag timing is this design's choice.
//
// Interface: n, p in (the line symbol; z needs no input); too_negative,
// too_positive out. Each is present from the instant of the offending
// symbol (combinational) and in every later instant (registered).
module observer_r1 (
  input  logic clk,
  input  logic rst_n,
  input  logic n,
  input  logic p,
  output logic too_negative,
  output logic too_positive
);

  typedef enum logic [2:0] {
    ACC_ZERO  = 3'd0,
    ACC_MINUS = 3'd1,  // -U
    ACC_PLUS  = 3'd2,  // +U
    TOO_NEG   = 3'd3,
    TOO_POS   = 3'd4
  } acc_state_t;

  acc_state_t state_q, state_d;

  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ACC_ZERO:  if (n) state_d = ACC_MINUS; else if (p) state_d = ACC_PLUS;
      ACC_MINUS: if (n) state_d = TOO_NEG;   else if (p) state_d = ACC_ZERO;
      ACC_PLUS:  if (n) state_d = ACC_ZERO;  else if (p) state_d = TOO_POS;
      TOO_NEG:   state_d = TOO_NEG;
      TOO_POS:   state_d = TOO_POS;
      default:   state_d = state_q;
    endcase
    too_negative = (state_d == TOO_NEG);
    too_positive = (state_d == TOO_POS);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= ACC_ZERO;
    else        state_q <= state_d;
  end

endmodule
