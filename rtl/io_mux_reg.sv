// io_mux_reg: I/O register group serving a pair of LUT blocks.
//
// The chip has four such groups (A: blocks 0 and 1, B: 2 and 3, C: 4 and 5,
// D: 6 and 7). At each I/O clock edge (io_edge) the group registers the
// pin inputs that become the two blocks' 13-bit EXT_IN, and registers both
// blocks' 8-bit cascade outputs onto the output pins. Because every block's
// output reaches a group register, any block can be the last stage of a
// cascade, and an intermediate stage's output can be a primary output too.
//
// Pin widths (2 x 13 inputs, 2 x 8 outputs) follow the bus widths printed
// in the block diagram; the pin multiplexing implied by the group's name is
// not specified and is not modelled: each pin has one fixed function.
// Timing: inputs and outputs change at the clock edge where io_edge is high.
module io_mux_reg
  import lutc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                io_edge,
  input  logic [2*ADDR_W-1:0] pin_in,     // {EXT_IN of odd block, EXT_IN of even block}
  output logic [ADDR_W-1:0]   ext_in0,    // to the even block of the pair
  output logic [ADDR_W-1:0]   ext_in1,    // to the odd block of the pair
  input  logic [DATA_W-1:0]   cas_out0,
  input  logic [DATA_W-1:0]   cas_out1,
  output logic [2*DATA_W-1:0] pin_out     // {odd block output, even block output}
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ext_in0 <= '0;
      ext_in1 <= '0;
      pin_out <= '0;
    end else if (io_edge) begin
      ext_in0 <= pin_in[ADDR_W-1:0];
      ext_in1 <= pin_in[2*ADDR_W-1:ADDR_W];
      pin_out <= {cas_out1, cas_out0};
    end
  end

endmodule
