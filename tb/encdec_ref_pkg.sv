// encdec_ref_pkg: reference model of the three-level line code, written
// straight from the definition of the code and used by the testbenches to
// work out expected values independently of the RTL.
//
// Symbols are integers: -1 for n, 0 for z, +1 for p.
//
// encode(): each 1 becomes the opposite of the last non-zero symbol
// (alternation); each 0 becomes z; but scanning from the left, every group
// of four 0s becomes P z z V, with P = z when the number of non-zero symbols
// sent so far is even and P = the alternating symbol when it is odd, and
// V = the last non-zero symbol (after P), i.e. a violation. The symbol
// before any non-zero symbol counts as n. Symbol i depends on bits 0..i+3
// only, so for a stream of N bits symbols 0..N-4 are exact.
//
// The hardware sees the stream preceded by three 0s (its look-ahead register
// starts cleared); with_prefix() builds that stream.
package encdec_ref_pkg;

  typedef bit bits_q[$];
  typedef int syms_q[$];

  function automatic bits_q with_prefix(bits_q x);
    bits_q v;
    v = '{1'b0, 1'b0, 1'b0};
    foreach (x[i]) v.push_back(x[i]);
    return v;
  endfunction

  function automatic syms_q encode(bits_q x);
    syms_q u;
    int    last = -1;   // u(0) = n by convention
    bit    even = 1'b1; // no non-zero symbol sent yet
    int    i = 0;
    while (i < x.size()) begin
      if (i + 3 < x.size() && !x[i] && !x[i+1] && !x[i+2] && !x[i+3]) begin
        if (even) u.push_back(0);
        else begin
          last = -last;
          u.push_back(last);
          even = ~even;
        end
        u.push_back(0);
        u.push_back(0);
        u.push_back(last);  // violation: repeats the last polarity
        even = ~even;
        i += 4;
      end else if (x[i]) begin
        last = -last;
        u.push_back(last);
        even = ~even;
        i += 1;
      end else begin
        u.push_back(0);
        i += 1;
      end
    end
    return u;
  endfunction

  // Random bit stream with long runs of 0s: with probability one_pct a bit
  // is 1.
  function automatic bits_q random_bits(int n, int one_pct);
    bits_q x;
    for (int i = 0; i < n; i++) x.push_back(($urandom % 100) < one_pct);
    return x;
  endfunction

  // Second, independent model: the classical ten-state Mealy machine of the
  // encoder. Its inputs are d (the input bit three instants ago) and f (1 when
  // d and the three bits after it are all 0); it returns the symbol and
  // updates the state. States 1..10; 1 is initial. States 1, 2 sit above the
  // "violation" line with the last pulse n resp. p; 6, 7 below it with the
  // last pulse n resp. p; 3-5 and 8-10 walk through P z z V.
  function automatic int mealy_step(ref int state, input bit d, input bit f);
    int s;
    case (state)
      1:  begin if (f) begin s = 0;  state = 3; end else if (d) begin s = 1;  state = 2; end else s = 0; end
      2:  begin if (f) begin s = -1; state = 3; end else if (d) begin s = -1; state = 1; end else s = 0; end
      3:  begin s = 0;  state = 4; end
      4:  begin s = 0;  state = 5; end
      5:  begin s = -1; state = 6; end
      6:  begin if (f) begin s = 1;  state = 8; end else if (d) begin s = 1;  state = 7; end else s = 0; end
      7:  begin if (f) begin s = 0;  state = 8; end else if (d) begin s = -1; state = 6; end else s = 0; end
      8:  begin s = 0;  state = 9; end
      9:  begin s = 0;  state = 10; end
      10: begin s = 1;  state = 2; end
      default: begin s = 99; state = 1; end
    endcase
    return s;
  endfunction

  function automatic string sym_name(int s);
    return (s < 0) ? "n" : (s > 0) ? "p" : "z";
  endfunction

endpackage
