// encoder: binary stream to three-level line code (the ENCODER).
//
// Each 1 is sent as p or n, alternating, and each 0 as z, except that every
// run of four 0s is replaced by P z z V: P is z if an even number of
// non-zero symbols has been sent so far and the alternating symbol
// otherwise, and V repeats the polarity of the last non-zero symbol (a
// deliberate violation of the alternation, which lets the decoder tell it
// from a 1). The running sum of the line voltage thus stays within -U..+U
// and the line never carries more than three z in a row.
//
// The encoder is four concurrent agents exchanging pure signals:
//   detector  : Bin -> DelayedX (Bin 3 instants ago) and FourZeros
//   sequencer : NORMAL / EXCEPTION control -> Zero, Alternation, Violation
//   nonzero   : Alternation / Violation -> Plus or Minus, and PlusOrMinus
//   parity    : PlusOrMinus -> Even
// Only the detector's look-ahead, the sequencer mode, the parity bit and
// the last polarity are registers; everything else settles within the
// instant.
//
// The split into four agents and their signals follows the original
// description, except that the Even signal between parity and sequencer is
// named here and not there.
//
// Interface: bin in; minus, zero, plus out, exactly one present in every
// instant. Timing: the symbol present in instant k encodes Bin of instant
// k-3 (3 instants of look-ahead). After reset the stream is encoded as if
// preceded by three 0s, so the first three symbols carry no input bit.
module encoder (
  input  logic clk,
  input  logic rst_n,
  input  logic bin,
  output logic minus,
  output logic zero,
  output logic plus
);

  // local signals of the encoder
  logic delayed_x, four_zeros, alternation, violation, plus_or_minus, even;

  detector u_detector (
    .clk, .rst_n,
    .bin,
    .delayed_x,
    .four_zeros
  );

  parity u_parity (
    .clk, .rst_n,
    .plus_or_minus,
    .even
  );

  sequencer u_sequencer (
    .clk, .rst_n,
    .delayed_x,
    .four_zeros,
    .even,
    .zero,
    .alternation,
    .violation
  );

  nonzero u_nonzero (
    .clk, .rst_n,
    .alternation,
    .violation,
    .plus,
    .minus,
    .plus_or_minus
  );

  // exactly one of n, z, p in every instant
  assert property (@(posedge clk) disable iff (!rst_n)
                   $onehot({minus, zero, plus}))
    else $error("encoder: output symbol is not exactly one of n, z, p");

endmodule
