// tb_mode_reg: self-checking test of the per-block mode register.
// Checks the reset value, that values load only while set is high, and that
// they hold otherwise.
module tb_mode_reg;
  import lutc_pkg::*;
  logic clk = 0, rst_n = 0, set = 0;
  mode_t mode_in, mode, held;
  int checks = 0, failures = 0;

  mode_reg dut (.clk, .rst_n, .set, .mode_in, .mode);

  always #5 clk = ~clk;

  task automatic check(mode_t got, mode_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode_in = '1;
    #12 check(mode, '0, "reset value");
    rst_n = 1;
    held = '0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      mode_in = mode_t'($urandom);
      set = ($urandom % 3) == 0;
      @(posedge clk); #1;
      if (set) held = mode_in;
      check(mode, held, "load/hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
