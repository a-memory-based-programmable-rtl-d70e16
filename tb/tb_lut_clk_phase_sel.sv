// tb_lut_clk_phase_sel: self-checking test of the LUT_CLK phase selector.
// Checks the reset mapping (block i on phase i), then programs random
// mappings and checks every block's LUT_CLK against every one-hot phase.
module tb_lut_clk_phase_sel;
  logic clk = 0, rst_n = 0;
  logic [7:0] p;
  logic set = 0;
  logic [2:0] bs = 0, phase_in = 0;
  logic [7:0] lut_clk;
  logic [7:0][2:0] phase;
  int map [8];
  int checks = 0, failures = 0;

  lut_clk_phase_sel dut (.clk, .rst_n, .p, .set, .bs, .phase_in, .lut_clk, .phase);

  always #5 clk = ~clk;

  task automatic sweep(string what);
    for (int k = 0; k < 8; k++) begin
      p = 8'(1 << k);
      #1;
      for (int i = 0; i < 8; i++) begin
        checks++;
        if (lut_clk[i] !== (map[i] == k)) begin
          failures++;
          if (failures < 10) $display("FAIL %s: block %0d phase p%0d lut_clk=%b map=%0d", what, i, k, lut_clk[i], map[i]);
        end
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    p = 0;
    for (int i = 0; i < 8; i++) map[i] = i;
    #12 rst_n = 1;
    sweep("reset mapping");
    for (int t = 0; t < 20; t++) begin
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        set = 1; bs = 3'($urandom); phase_in = 3'($urandom);
        map[bs] = int'(phase_in);
      end
      @(negedge clk);
      set = 0; bs = 3'($urandom); phase_in = 3'($urandom);   // no load without set
      @(negedge clk);
      sweep("programmed mapping");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
