// tb_io_mux_reg: self-checking test of an I/O register group.
// Inputs and outputs must change only at the edge where io_edge is high.
module tb_io_mux_reg;
  logic clk = 0, rst_n = 0, io_edge = 0;
  logic [25:0] pin_in;
  logic [12:0] ext_in0, ext_in1;
  logic [7:0] cas_out0, cas_out1;
  logic [15:0] pin_out;
  logic [25:0] exp_in;
  logic [15:0] exp_out;
  int checks = 0, failures = 0;

  io_mux_reg dut (.clk, .rst_n, .io_edge, .pin_in, .ext_in0, .ext_in1, .cas_out0, .cas_out1, .pin_out);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    pin_in = 0; cas_out0 = 0; cas_out1 = 0;
    exp_in = 0; exp_out = 0;
    #12 rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      pin_in = 26'($urandom); cas_out0 = 8'($urandom); cas_out1 = 8'($urandom);
      io_edge = ($urandom % 4) == 0;
      @(posedge clk); #1;
      if (io_edge) begin
        exp_in = pin_in;
        exp_out = {cas_out1, cas_out0};
      end
      checks++;
      if ({ext_in1, ext_in0} !== exp_in || pin_out !== exp_out) begin
        failures++;
        $display("FAIL cycle %0d: ext %h/%h exp %h, out %h exp %h", i, ext_in1, ext_in0, exp_in, pin_out, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
