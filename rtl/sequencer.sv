// sequencer: core of the encoding algorithm (the SEQUENCER agent).
//
// Two modes. In NORMAL mode, each instant, the delayed input bit DelayedX is
// encoded on its own: a 1 asks for an Alternation (a non-zero symbol of the
// opposite polarity to the last one), a 0 gives Zero. As soon as FourZeros
// is present, NORMAL is left at once (in that same instant, before it
// reacts) and the EXCEPTION sequence replaces the four 0s by P z z V over
// four instants:
//   instant 1  P: Zero if the parity is Even, otherwise Alternation
//   instant 2  Zero
//   instant 3  Zero
//   instant 4  V: Violation (same polarity as the last non-zero symbol)
// The sequence then ends by itself and NORMAL is re-entered in the
// following instant, where FourZeros is again tested first. FourZeros in
// instants 2 to 4 of an exception is ignored: those zeros already belong to
// the run being replaced.
//
// The two modes, the immediate switch on FourZeros and the P z z V steps
// follow the original description; the state encoding is this design's.
//
// Interface: delayed_x, four_zeros, even in; zero, alternation, violation
// out, exactly one of them present each instant, combinational from the
// inputs and the mode register. The mode register holds NORMAL or the
// instant of the exception to come next.
module sequencer (
  input  logic clk,
  input  logic rst_n,
  input  logic delayed_x,
  input  logic four_zeros,
  input  logic even,
  output logic zero,
  output logic alternation,
  output logic violation
);

  typedef enum logic [1:0] {
    NORMAL = 2'd0,  // NORMAL mode (or an exception has just terminated)
    EXC_Z1 = 2'd1,  // exception, instant 2: first z
    EXC_Z2 = 2'd2,  // exception, instant 3: second z
    EXC_V  = 2'd3   // exception, instant 4: violation
  } seq_state_t;

  seq_state_t state_q, state_d;

  always_comb begin
    zero        = 1'b0;
    alternation = 1'b0;
    violation   = 1'b0;
    state_d     = state_q;
    unique case (state_q)
      NORMAL: begin
        if (four_zeros) begin
          // strong, immediate pre-emption of NORMAL: instant 1 of EXCEPTION
          if (even) zero = 1'b1;
          else      alternation = 1'b1;
          state_d = EXC_Z1;
        end else if (delayed_x) begin
          alternation = 1'b1;
        end else begin
          zero = 1'b1;
        end
      end
      EXC_Z1: begin
        zero    = 1'b1;
        state_d = EXC_Z2;
      end
      EXC_Z2: begin
        zero    = 1'b1;
        state_d = EXC_V;
      end
      EXC_V: begin
        violation = 1'b1;
        state_d   = NORMAL;  // normal termination back to NORMAL
      end
      default: state_d = NORMAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state_q <= NORMAL;
    else        state_q <= state_d;
  end

endmodule
