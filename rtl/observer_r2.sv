// observer_r2: safety observer for requirement 2, the line never carries
// more than three z in a row.
//
// A chain of states counts consecutive z symbols; the first z is counted in
// the very instant it appears. A p or an n pre-empts the chain and restarts
// it from its first state. The fourth z in a row reaches the final state
// TooManyZ, which is kept until the next p or n.
//
// The chain of four z steps restarted by a pulse follows the original
// description; the saturating counter and the flag timing are this
// design's.
//
// Interface: n, z, p in; too_many_z out, present (combinational) in each
// instant that ends a run of four or more z. The observer changes nothing
// in the design.
module observer_r2 (
  input  logic clk,
  input  logic rst_n,
  input  logic n,
  input  logic z,
  input  logic p,
  output logic too_many_z
);

  localparam int unsigned RUN = encdec_pkg::ZERO_RUN;

  logic [$clog2(RUN+1)-1:0] zrun_q, zrun_d;  // z seen so far in the run, saturating at RUN

  always_comb begin
    zrun_d = zrun_q;
    if (p || n)
      zrun_d = '0;                    // strong pre-emption: restart the chain
    else if (z && zrun_q != RUN[$bits(zrun_q)-1:0])
      zrun_d = zrun_q + 1'b1;
    too_many_z = (zrun_d == RUN[$bits(zrun_q)-1:0]) && z && !(p || n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) zrun_q <= '0;
    else        zrun_q <= zrun_d;
  end

endmodule
