// observer_exclusion: safety observer checking that in every instant exactly
// one of the line symbols n, z, p is emitted.
//
// Purely combinational: non_exclusive is present in any instant in which
// none, two or all three of n, z, p are present. It changes nothing in the
// design.
//
// The property is the original one; the logic is written here from it.
//
// Interface: n, z, p in; non_exclusive out, no latency.
module observer_exclusion (
  input  logic n,
  input  logic z,
  input  logic p,
  output logic non_exclusive
);

  always_comb begin
    non_exclusive = !(( n && !z && !p) ||
                      (!n &&  z && !p) ||
                      (!n && !z &&  p));
  end

endmodule
