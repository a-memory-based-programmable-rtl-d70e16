// lut_block: one stage of the LUT cascade.
//
// Datapath, in the order of the block diagram:
//   SW1         picks the cascade input: IN1 (ring predecessor) or IN2
//               (vertically adjacent block), by mode bit c1.
//   rail switch forms the 8-bit row address from the cascade input and
//               EXT_IN[7:0], by the rail count c0.
//   SRAM        64 kbit core; the column address is EXT_IN[12:8].
//   SW2         picks the SRAM word or, for redundancy, the cascade input
//               itself (bypass, mode bit c2). A bypassed core is switched
//               off (pwr_on = 0) and never accessed.
//   DATA REG    8-bit register latching the SW2 output at the end of the
//               block's LUT_CLK phase; it drives the cascade output.
//
// Programming: the global write bus (we, wdata) is qualified by the block
// select (bsel) and written during the block's phase, at the address the
// block currently forms; programming is therefore done with c0 = 0 so that
// the whole 13-bit address comes from EXT_IN.
//
// Timing: lut_clk is a one-cycle phase pulse in the internal clock domain.
// During that cycle the SRAM is read combinationally; at the rising edge
// that ends it, the data register loads (this stands for the falling edge
// of the LUT clock in the silicon). The output then holds until the block's
// next phase, one I/O clock period later.
//
// The split of EXT_IN into 8 rail-switch bits and 5 column bits follows the
// widths printed in the block diagram; which bit positions go where, the
// rail-count code of c0 and the data register's reset value of 0 are this
// design's choices.
module lut_block
  import lutc_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              lut_clk,     // this block's LUT_CLK phase pulse
  input  logic [ADDR_W-1:0] ext_in,      // EXT_IN from the I/O register
  input  logic [DATA_W-1:0] in1,         // cascade input from the ring predecessor
  input  logic [DATA_W-1:0] in2,         // cascade input from the vertical neighbour
  input  logic              bsel,        // block select decoded from BS
  input  logic              we,          // global write enable
  input  logic [DATA_W-1:0] wdata,       // global DATA bus
  input  logic              mode_set,    // load the mode register (already block-selected)
  input  mode_t             mode_in,
  output logic [DATA_W-1:0] cas_out,     // DATA REG, the cascade output
  output mode_t             mode         // current mode, for observation
);

  logic [DATA_W-1:0] sw1_out;
  logic [ROW_W-1:0]  row;
  logic [DATA_W-1:0] sram_q;
  logic [DATA_W-1:0] sw2_out;
  logic              pwr_on;

  mode_reg u_mode (
    .clk     (clk),
    .rst_n   (rst_n),
    .set     (mode_set),
    .mode_in (mode_in),
    .mode    (mode)
  );

  // SW1
  assign sw1_out = mode.c1_in2 ? in2 : in1;

  rail_switch #(.W(ROW_W), .CW(RAILC_W)) u_rail (
    .n_rails  (mode.c0_rails),
    .cas_in   (sw1_out),
    .ext_in   (ext_in[ROW_W-1:0]),
    .addr_out (row)
  );

  assign pwr_on = !mode.c2_bypass;

  sram_64k #(.ROW_W(ROW_W), .COL_W(COL_W), .DATA_W(DATA_W)) u_sram (
    .clk    (clk),
    .ce     (lut_clk),
    .pwr_on (pwr_on),
    .we     (we && bsel),
    .row    (row),
    .col    (ext_in[ADDR_W-1:ROW_W]),
    .wdata  (wdata),
    .rdata  (sram_q)
  );

  // SW2
  assign sw2_out = mode.c2_bypass ? sw1_out : sram_q;

  // DATA REG
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cas_out <= '0;
    else if (lut_clk) cas_out <= sw2_out;
  end

endmodule
