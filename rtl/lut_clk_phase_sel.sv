// lut_clk_phase_sel: the LUT_CLK phase selector.
//
// Gives each of the N_LUT blocks one of the phase pulses p0..p7 as its
// LUT_CLK. The choice is held in one 3-bit register per block, loaded at a
// rising clock edge while set is high, for the block named on the block
// select bus bs. After reset block i uses phase i, the single 8-LUT cascade
// 0 -> 1 -> ... -> 7. Placing a block on an earlier or later phase is how a
// cascade may start at any block of a loop and how two or four cascades
// run side by side within one I/O period.
// The selector's existence and its inputs and outputs are in the schematic;
// how it is programmed is this design's choice.
module lut_clk_phase_sel
  import lutc_pkg::*;
#(
  parameter int unsigned N_BLK = N_LUT,
  parameter int unsigned N_SRC = 8      // selectable phases p0..p7
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N_SRC-1:0] p,
  input  logic             set,
  input  logic [BS_W-1:0]  bs,
  input  logic [PH_W-1:0]  phase_in,
  output logic [N_BLK-1:0] lut_clk,
  output logic [N_BLK-1:0][PH_W-1:0] phase   // current selection, for observation
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < N_BLK; i++) phase[i] <= PH_W'(i);
    end else if (set) begin
      phase[bs] <= phase_in;
    end
  end

  always_comb begin
    for (int unsigned i = 0; i < N_BLK; i++) lut_clk[i] = p[phase[i]];
  end

endmodule
