// tb_lut_clk_gen: self-checking test of the multi-phase clock generator.
// Drives IO_CLK at 1/9, 1/5 and 1/3 of the clock (the three PLL ratios) and
// checks that after each IO_CLK rise p0, p1, ... pulse one per cycle in
// order, exactly one at a time, and that io_edge comes one cycle before p0.
module tb_lut_clk_gen;
  logic clk = 0, rst_n = 0, io_clk = 0;
  logic [8:0] p;
  logic io_edge;
  int checks = 0, failures = 0;
  int ratio;
  int cnt;

  lut_clk_gen dut (.clk, .rst_n, .io_clk, .p, .io_edge);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t (ratio %0d, cnt %0d, p=%b)", what, $time, ratio, cnt, p);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int ratios[3] = '{9, 5, 3};
    #12 rst_n = 1;
    foreach (ratios[r]) begin
      ratio = ratios[r];
      // cnt = cycles since io_clk went high; io_clk is high for ceil(ratio/2)
      for (int period = 0; period < 12; period++) begin
        for (cnt = 0; cnt < ratio; cnt++) begin
          @(negedge clk);
          io_clk = (cnt < (ratio + 1) / 2);
          if (period >= 2) begin
            #1;
            // io_edge: the cycle in which io_clk is first high
            check(io_edge == (cnt == 0), "io_edge position");
            // p[k] in the cycle k+1 after io_clk rose (k < ratio)
            for (int k = 0; k < ratio && k < 9; k++)
              check(p[k] == (cnt == (k + 1) % ratio), $sformatf("p%0d position", k));
            begin
              automatic int n = 0;
              for (int k = 0; k < ratio && k < 9; k++) n += int'(p[k]);
              check(n == 1, "exactly one phase high");
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
