// detector: look-ahead shift register and detector of four consecutive 0s
// (the DETECTOR agent of the encoder).
//
// Bin enters a 3-stage shift register built from three sc_delay instances
// (D0, D1, D2). Naming the taps Bit0 = Bin, Bit1, Bit2 and Bit3 = DelayedX,
// the detector emits FourZeros in every instant in which all four taps are
// absent, i.e. when DelayedX and the three bits that follow it are all 0.
// DelayedX is therefore the input bit of three instants ago: it is the bit
// the rest of the encoder encodes now, with Bit0..Bit2 as its look-ahead.
//
// The three-stage structure and the four-zeros test follow the original
// description of the agent; the reset value is this design's choice.
//
// Interface: bin in; delayed_x = Bin of 3 cycles ago (registered);
// four_zeros combinational from bin and the registers. After reset the
// register holds zeros, so the stream is read as if preceded by three 0s.
module detector (
  input  logic clk,
  input  logic rst_n,
  input  logic bin,
  output logic delayed_x,
  output logic four_zeros
);

  logic bit1, bit2, bit3;

  sc_delay u_d0 (.clk, .rst_n, .d(bin),  .q(bit1));
  sc_delay u_d1 (.clk, .rst_n, .d(bit1), .q(bit2));
  sc_delay u_d2 (.clk, .rst_n, .d(bit2), .q(bit3));

  assign delayed_x  = bit3;
  assign four_zeros = !(bin || bit1 || bit2 || bit3);

endmodule
