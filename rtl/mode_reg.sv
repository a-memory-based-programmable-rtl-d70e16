// mode_reg: the mode register of one LUT block.
//
// Holds the controls c0 (rail count), c1 (SW1 input select) and c2 (SW2
// bypass select) as one lutc_pkg::mode_t. It loads mode_in at a rising
// clock edge while set is high; the block diagram's Set_CLK is realised as
// this load enable in the single internal clock domain. The top drives set
// from a global mode-set strobe qualified by the block-select bus.
// Reset value (this design's choice): c0 = 0 (all address bits external),
// IN1 selected, no bypass.
module mode_reg
  import lutc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  set,
  input  mode_t mode_in,
  output mode_t mode
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   mode <= '0;
    else if (set) mode <= mode_in;
  end

endmodule
