// sc_delay: one-instant delay of a pure signal (the DELAY agent).
//
// The output is present in an instant exactly when the input was present in
// the previous instant. One instant is one clock cycle. After reset the
// output is absent, as if the input had been absent before the first
// instant. Three of these form the encoder's look-ahead shift register and
// six the reference shift register of the sequence observer.
//
// The delay agent's job is fixed by the design; clearing it at reset (and
// so reading the stream as preceded by 0s) is this design's choice.
//
// Interface: clk, rst_n (asynchronous, active low), d (input signal),
// q (d delayed by one cycle). Latency: 1 cycle.
module sc_delay (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= d;
  end

endmodule
