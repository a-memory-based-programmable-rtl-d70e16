// sram_64k: the 64 kbit synchronous SRAM core of one LUT block.
//
// Organisation follows the block diagram: 256 words (rows, selected by the
// row decoder from an 8-bit row address) by 32 columns (selected by the
// column decoder from a 5-bit column address) by 8 bits, i.e. 8192 x 8.
// The core is synchronous: it is accessed only while its LUT clock phase is
// high (ce = 1) and it is powered (pwr_on = 1). While accessed, rdata shows
// the addressed word and the LUT block's data register latches it at the end
// of the phase; outside its phase, or when powered off, rdata is 0, which
// stands for an idle core that draws no sense-amplifier current. A write
// (we = 1 during the phase) stores wdata at the end of the phase.
//
// Interface: one clock (the internal multiplied clock); ce is the block's
// LUT_CLK phase pulse, one clock cycle long. Read: combinational within the
// phase. Write: at the rising clock edge that ends the phase.
//
// Analog parts (bitline load, sense amplifiers, the pMOS power switch) are
// reduced to this behaviour. The powered-off core keeps its contents here;
// the silicon's behaviour on power-down is not part of this model. The
// array is written as a memory so that it maps to an SRAM macro.
module sram_64k #(
  parameter int unsigned ROW_W  = 8,   // 256 rows
  parameter int unsigned COL_W  = 5,   // 32 columns
  parameter int unsigned DATA_W = 8    // 8-bit words
) (
  input  logic              clk,
  input  logic              ce,       // LUT_CLK phase: core accessed while high
  input  logic              pwr_on,   // 0 = core switched off (bypassed block)
  input  logic              we,       // write enable (already block-selected)
  input  logic [ROW_W-1:0]  row,      // to row decoder (XDEC)
  input  logic [COL_W-1:0]  col,      // to column decoder (YDEC)
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned DEPTH = 1 << (ROW_W + COL_W);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [ROW_W+COL_W-1:0] addr;
  logic active;

  assign addr   = {col, row};
  assign active = ce && pwr_on;

  always_ff @(posedge clk) begin
    if (active && we) mem[addr] <= wdata;
  end

  always_comb begin
    rdata = '0;
    if (active) rdata = mem[addr];
  end

endmodule
