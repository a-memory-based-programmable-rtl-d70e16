// rail_switch: the 8-bit rail switch of a LUT block.
//
// For each of the 8 row-address bits it selects either the cascade signal
// arriving from the previous LUT block (through SW1) or the block's external
// input. This is what lets a cascade stage use some of the previous stage's
// outputs ("rails") and fill the rest of its address with primary inputs.
// The block diagram prints a 4-bit control (c0); this design reads it as the
// number of rails n_rails (0..8): bits [n_rails-1:0] come from the cascade,
// the others from the external input. Values above 8 act as 8.
//
// Purely combinational.
module rail_switch #(
  parameter int unsigned W  = 8,
  parameter int unsigned CW = 4
) (
  input  logic [CW-1:0] n_rails,   // c0 from the mode register
  input  logic [W-1:0]  cas_in,    // cascade input (SW1 output)
  input  logic [W-1:0]  ext_in,    // external input bits
  output logic [W-1:0]  addr_out   // to the row decoder
);

  always_comb begin
    for (int unsigned b = 0; b < W; b++) begin
      addr_out[b] = (b < n_rails) ? cas_in[b] : ext_in[b];
    end
  end

endmodule
