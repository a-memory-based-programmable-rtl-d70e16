// lut_clk_gen: multi-phase LUT clock generator.
//
// The PLL (outside this module) multiplies the I/O clock by 9, 5 or 3 and
// drives clk. IO_CLK is shifted through a chain of flip-flops clocked by
// the multiplied clock; phase k is high while stage k already holds the new
// high level of IO_CLK and stage k+1 does not yet, so each rising edge of
// IO_CLK produces one pulse on p0, then p1, and so on, each one clock cycle
// long and none overlapping. With a 9x clock, p0..p7 drive the eight LUT
// blocks and p8 is the idle ninth phase that gives the setup and hold
// margins at the I/O registers. With a 5x (3x) clock only p0..p4 (p0..p2)
// fall inside one I/O period.
//
// io_edge marks the clock edge at which the I/O registers take their new
// values: it is high in the cycle before p0, when IO_CLK is high and stage 0
// still low. In the silicon the I/O registers are clocked by IO_CLK itself
// and the chain by the inverted multiplied clock; here everything runs on
// the rising edge of clk and io_clk must change away from that edge (it is
// produced by the same PLL, so it is synchronous to clk).
//
// The chain length (a stage per phase plus one) and the pulse rule follow
// the schematic and timing chart; the single-edge clocking is this design's.
module lut_clk_gen #(
  parameter int unsigned N_PH = 9   // phase pulses p0..p(N_PH-1)
) (
  input  logic            clk,      // multiplied (PLL) clock
  input  logic            rst_n,
  input  logic            io_clk,   // IO_CLK, synchronous to clk
  output logic [N_PH-1:0] p,        // phase pulses
  output logic            io_edge   // I/O register load enable
);

  logic [N_PH:0] q;   // delay chain, q[0] first stage

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= {q[N_PH-1:0], io_clk};
  end

  always_comb begin
    for (int unsigned k = 0; k < N_PH; k++) p[k] = q[k] && !q[k+1];
  end

  assign io_edge = io_clk && !q[0];

  // Phases come in order: p(k) is only ever high in the cycle after p(k-1).
  // The check is off while in reset, since the chain holds arbitrary
  // power-up values until reset first acts. Its use of rst_n is what lint
  // reports as a reset used both synchronously and asynchronously; the
  // flip-flops themselves use rst_n only asynchronously.
  // (With a 5x or 3x clock the unused higher phases coincide with the next
  // period's p0, p1, ... so a plain one-hot rule would not hold.)
  for (genvar k = 1; k < N_PH; k++) begin : g_order
    a_phase_order: assert property (@(posedge clk) disable iff (!rst_n) p[k] |-> $past(p[k-1]))
      else $error("lut_clk_gen: p%0d without p%0d before it", k, k - 1);
  end

endmodule
