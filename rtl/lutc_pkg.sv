// lutc_pkg: constants and types shared by the LUT cascade device.
//
// The device is eight LUT blocks, each a 64 kbit synchronous SRAM
// (256 rows x 32 columns x 8 bits) addressed by 13 bits and producing 8 bits.
// Eight of the 13 address bits (the row, through the row decoder) come from
// the rail switch, which mixes the previous block's 8-bit output ("rails")
// with external inputs; the other 5 (the column) come straight from the
// external inputs. The per-block mode register holds the three controls the
// LUT block needs: c0 (rail switch, 4 bits), c1 (SW1 input select) and c2
// (SW2 bypass select). The 4-bit width of c0 is printed in the block
// diagram; what its code means is this design's choice: it is the number of
// low-order rails, 0 to 8, taken from the cascade.
package lutc_pkg;

  localparam int unsigned N_LUT    = 8;   // LUT blocks on the chip
  localparam int unsigned DATA_W   = 8;   // SRAM data / cascade width
  localparam int unsigned ROW_W    = 8;   // row address (256 words)
  localparam int unsigned COL_W    = 5;   // column address (32 columns)
  localparam int unsigned ADDR_W   = ROW_W + COL_W;  // 13-bit EXT_IN
  localparam int unsigned RAILC_W  = 4;   // width of c0
  localparam int unsigned N_PHASE  = 9;   // phase pulses p0..p8
  localparam int unsigned PH_W     = 3;   // index of a LUT_CLK phase, p0..p7
  localparam int unsigned BS_W     = 3;   // block select bus

  // Contents of one block's mode register.
  typedef struct packed {
    logic [RAILC_W-1:0] c0_rails;   // cascade rails used by the row address, 0..8
    logic               c1_in2;     // SW1: 0 = IN1 (ring predecessor), 1 = IN2 (vertical neighbour)
    logic               c2_bypass;  // SW2: 1 = bypass the SRAM (redundancy), core powered off
  } mode_t;

endpackage
