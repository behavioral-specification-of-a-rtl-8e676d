// tb_decoder: self-checking testbench of the line decoder.
//
// Feeds the decoder with symbol streams produced by the reference model of
// the code (encdec_ref_pkg::encode of a bit stream preceded by three 0s,
// the stream an encoder sends after reset) and checks that bout in cycle k
// equals bit k-3 of that stream (0 for the three assumed leading 0s). The
// worked example of the code (z p n z z n p z z z p) is decoded first, then
// long random streams. Counts how often a P symbol was recognised as
// belonging to a run of 0s and how often a violation was decoded as 0.
module tb_decoder;
  import encdec_ref_pkg::*;
  import encdec_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  line_sym_t sym = SYM_Z;
  logic bout;
  int checks = 0, failures = 0;
  int n_p_nonzero = 0, n_violation = 0, n_ones = 0;

  decoder dut (.clk, .rst_n, .minus(sym.minus), .zero(sym.zero), .plus(sym.plus), .bout);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_stream(bits_q x);
    bits_q v;
    syms_q u;
    rst_n = 1'b0;
    sym   = SYM_Z;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    v = with_prefix(x);
    u = encode(v);
    for (int k = 0; k < u.size() - 3; k++) begin
      sym = (u[k] > 0) ? SYM_P : (u[k] < 0) ? SYM_N : SYM_Z;
      #1;
      if (k >= 3) begin
        checks++;
        if (bout !== v[k-3]) begin
          failures++; $display("k=%0d bout=%b expected %b", k, bout, v[k-3]);
        end
        if (v[k-3]) n_ones++;
        // a non-zero P symbol: non-zero, followed by z z and a repeat of itself
        if (u[k-3] != 0 && u[k] == u[k-3] && u[k-1] == 0 && u[k-2] == 0) n_p_nonzero++;
      end else begin
        checks++;
        if (bout !== 1'b0) begin failures++; $display("k=%0d bout=%b during fill", k, bout); end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    // the worked example, after a 1 1 preamble (see tb_encoder)
    run_stream('{1,1, 0,1,0,0,0,0,1,0,0,0,0, 1,1,1,1});
    for (int r = 0; r < 6; r++) run_stream(random_bits(2000, 10 + 10 * r));
    checks++;
    if (n_p_nonzero == 0 || n_ones == 0) begin
      failures++; $display("a non-zero P or a 1 never occurred");
    end
    $display("decoded ones=%0d, non-zero P symbols=%0d", n_ones, n_p_nonzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
