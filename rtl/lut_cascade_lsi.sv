// lut_cascade_lsi: memory-based programmable logic device built from a
// cascade of eight SRAM look-up tables.
//
// A multi-output logic function is decomposed into a cascade of tables: each
// stage reads some primary inputs plus the "rail" outputs of the previous
// stage and produces rails for the next. Here each stage is a LUT block
// with a 64 kbit SRAM (13 address bits, 8 data bits).
//
// Flexible cascade connection: the blocks sit in a ring 0 -> 1 -> ... -> 7
// -> 0 (upper row 0..3 left to right, lower row 4..7 right to left). Each
// block's IN1 is the output of its ring predecessor and its IN2 the output
// of the block facing it in the other row (block 7-i); SW1 in each block
// picks one. With these two choices the blocks form one 8-block loop, two
// 4-block loops {0,1,6,7} {2,3,4,5}, or four 2-block loops {0,7} {1,6}
// {2,5} {3,4}, and a cascade may start at any block of its loop.
//
// Pseudo-asynchronous operation: clk is the PLL output, 9x, 5x or 3x the
// I/O clock. lut_clk_gen turns each I/O period into one-cycle phase pulses
// p0..p8; lut_clk_phase_sel hands each block its phase. A block reads its
// SRAM only during its own phase and latches the result at the end of it,
// so the stages of a cascade fire one after another inside one I/O period
// and only one word per block is accessed per period. The last phase of the
// period is left idle as the timing margin at the I/O registers: an 8-block
// cascade needs 9 phases, a 4-block one 5, a 2-block one 3.
//
// I/O: four register groups A..D each serve two blocks: in_x carries the two
// blocks' 13-bit EXT_IN ({odd block, even block}), out_x their two 8-bit
// outputs. Inputs are taken at an I/O clock edge and the results of that
// period appear on out_x at the next one: latency one I/O period.
//
// Programming (this design's choice of protocol around the WE, BS and DATA
// buses of the block diagram):
//   - mode_set with bs = i loads mode_in into block i's mode register;
//   - phase_set with bs = i sets block i's LUT_CLK phase to phase_in;
//   - we with bs = i writes data into block i's SRAM during block i's
//     phase, at the address the block forms (use c0 = 0: all 13 address
//     bits from EXT_IN).
// All of these are sampled on the rising edge of clk.
//
// The PLL is outside this module: clk and io_clk are its two outputs, and
// io_clk must be synchronous to clk and change away from its rising edge.
module lut_cascade_lsi
  import lutc_pkg::*;
(
  input  logic                clk,        // PLL output (9x / 5x / 3x)
  input  logic                rst_n,
  input  logic                io_clk,     // IO_CLK
  input  logic [2*ADDR_W-1:0] in_a,       // EXT_IN of blocks 1 and 0
  input  logic [2*ADDR_W-1:0] in_b,       // EXT_IN of blocks 3 and 2
  input  logic [2*ADDR_W-1:0] in_c,       // EXT_IN of blocks 5 and 4
  input  logic [2*ADDR_W-1:0] in_d,       // EXT_IN of blocks 7 and 6
  output logic [2*DATA_W-1:0] out_a,      // outputs of blocks 1 and 0
  output logic [2*DATA_W-1:0] out_b,      // outputs of blocks 3 and 2
  output logic [2*DATA_W-1:0] out_c,      // outputs of blocks 5 and 4
  output logic [2*DATA_W-1:0] out_d,      // outputs of blocks 7 and 6
  input  logic                we,         // WE
  input  logic [BS_W-1:0]     bs,         // BS, block select
  input  logic [DATA_W-1:0]   data,       // DATA
  input  logic                mode_set,
  input  mode_t               mode_in,
  input  logic                phase_set,
  input  logic [PH_W-1:0]     phase_in
);

  logic [N_PHASE-1:0]             p;
  logic                           io_edge;
  logic [N_LUT-1:0]               lut_clk;
  logic [N_LUT-1:0][PH_W-1:0]     phase;
  logic [N_LUT-1:0][ADDR_W-1:0]   ext_in;
  logic [N_LUT-1:0][DATA_W-1:0]   cas_out;
  mode_t [N_LUT-1:0]              mode;

  lut_clk_gen #(.N_PH(N_PHASE)) u_clkgen (
    .clk     (clk),
    .rst_n   (rst_n),
    .io_clk  (io_clk),
    .p       (p),
    .io_edge (io_edge)
  );

  // p8 is the idle phase; only p0..p7 are selectable.
  lut_clk_phase_sel #(.N_BLK(N_LUT), .N_SRC(8)) u_phsel (
    .clk      (clk),
    .rst_n    (rst_n),
    .p        (p[7:0]),
    .set      (phase_set),
    .bs       (bs),
    .phase_in (phase_in),
    .lut_clk  (lut_clk),
    .phase    (phase)
  );

  io_mux_reg u_io_a (
    .clk (clk), .rst_n (rst_n), .io_edge (io_edge),
    .pin_in (in_a), .ext_in0 (ext_in[0]), .ext_in1 (ext_in[1]),
    .cas_out0 (cas_out[0]), .cas_out1 (cas_out[1]), .pin_out (out_a)
  );
  io_mux_reg u_io_b (
    .clk (clk), .rst_n (rst_n), .io_edge (io_edge),
    .pin_in (in_b), .ext_in0 (ext_in[2]), .ext_in1 (ext_in[3]),
    .cas_out0 (cas_out[2]), .cas_out1 (cas_out[3]), .pin_out (out_b)
  );
  io_mux_reg u_io_c (
    .clk (clk), .rst_n (rst_n), .io_edge (io_edge),
    .pin_in (in_c), .ext_in0 (ext_in[4]), .ext_in1 (ext_in[5]),
    .cas_out0 (cas_out[4]), .cas_out1 (cas_out[5]), .pin_out (out_c)
  );
  io_mux_reg u_io_d (
    .clk (clk), .rst_n (rst_n), .io_edge (io_edge),
    .pin_in (in_d), .ext_in0 (ext_in[6]), .ext_in1 (ext_in[7]),
    .cas_out0 (cas_out[6]), .cas_out1 (cas_out[7]), .pin_out (out_d)
  );

  for (genvar i = 0; i < N_LUT; i++) begin : g_lut
    localparam int unsigned PRED = (i + N_LUT - 1) % N_LUT;   // ring predecessor
    localparam int unsigned VERT = N_LUT - 1 - i;             // block facing it

    lut_block u_lut (
      .clk      (clk),
      .rst_n    (rst_n),
      .lut_clk  (lut_clk[i]),
      .ext_in   (ext_in[i]),
      .in1      (cas_out[PRED]),
      .in2      (cas_out[VERT]),
      .bsel     (bs == BS_W'(i)),
      .we       (we),
      .wdata    (data),
      .mode_set (mode_set && (bs == BS_W'(i))),
      .mode_in  (mode_in),
      .cas_out  (cas_out[i]),
      .mode     (mode[i])
    );
  end

  // The phase selection and mode registers are exposed internally for
  // observation only; p8 is intentionally unused.
  logic unused_ok;
  assign unused_ok = ^{p[8], phase, mode};

endmodule
