// observer_sequence: safety observer checking that the encoder/decoder pair
// gives back the input stream.
//
// Bin is fed into a DEPTH-stage shift register of sc_delay instances; its
// last stage, Bin of DEPTH instants ago, is compared with Bout in every
// instant, and any difference emits violation. DEPTH is the end-to-end
// latency of the pair, 6 instants (3 in the encoder, 3 in the decoder).
// After reset the register holds zeros, as do the encoder's and decoder's,
// so the comparison is valid from the first instant.
//
// The 6-stage shift register and the comparison follow the original
// description of the observer.
//
// Interface: bin, bout in; violation out, combinational from bout and the
// register. The observer changes nothing in the design.
module observer_sequence #(
  parameter int unsigned DEPTH = encdec_pkg::CODEC_LATENCY
) (
  input  logic clk,
  input  logic rst_n,
  input  logic bin,
  input  logic bout,
  output logic violation
);

  logic [DEPTH:0] stage;  // stage[0] = Bin, stage[i] = Bin of i instants ago

  assign stage[0] = bin;

  for (genvar i = 0; i < DEPTH; i++) begin : g_shift
    sc_delay u_delay (.clk, .rst_n, .d(stage[i]), .q(stage[i+1]));
  end

  assign violation = stage[DEPTH] ^ bout;

endmodule
