// tb_lut_block: self-checking test of one LUT block.
// Programs the whole 8192-word table through the write bus (c0 = 0, address
// from EXT_IN), then evaluates with random rail counts, both SW1 inputs and
// the bypass, checking the data register against a model: row bits below
// the rail count from the selected cascade input, the rest and the column
// from EXT_IN. Also checks that the register changes only at the end of the
// block's phase, that writes need the block select and that a bypassed
// block neither reads nor writes its core.
module tb_lut_block;
  import lutc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic lut_clk = 0;
  logic [12:0] ext_in = 0;
  logic [7:0] in1 = 0, in2 = 0;
  logic bsel = 0, we = 0, mode_set = 0;
  logic [7:0] wdata = 0;
  mode_t mode_in = '0, mode;
  logic [7:0] cas_out;
  logic [7:0] table_m [8192];
  int checks = 0, failures = 0;
  int n_bypass = 0, n_in2 = 0, n_rails = 0;

  lut_block dut (.clk, .rst_n, .lut_clk, .ext_in, .in1, .in2, .bsel, .we, .wdata,
                 .mode_set, .mode_in, .cas_out, .mode);

  always #5 clk = ~clk;

  function automatic logic [7:0] pat(int a);
    return 8'((a * 73) ^ (a >> 6) ^ 8'h3c);
  endfunction

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic set_mode(mode_t m);
    @(negedge clk); mode_set = 1; mode_in = m;
    @(negedge clk); mode_set = 0;
  endtask

  // one phase: pulse lut_clk for one cycle
  task automatic phase();
    @(negedge clk); lut_clk = 1;
    @(negedge clk); lut_clk = 0;
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    set_mode('{c0_rails: 4'd0, c1_in2: 1'b0, c2_bypass: 1'b0});
    // program: block selected, write during the phase
    for (int a = 0; a < 8192; a++) begin
      table_m[a] = pat(a);
      @(negedge clk);
      ext_in = 13'(a); wdata = pat(a); we = 1; bsel = 1; lut_clk = 1;
    end
    @(negedge clk); we = 0; lut_clk = 0;
    // a write without block select is ignored
    ext_in = 13'd5; wdata = ~pat(5); we = 1; bsel = 0;
    phase();
    we = 0;
    check(cas_out, pat(5), "unselected write ignored, read address 5");
    // evaluations
    for (int t = 0; t < 3000; t++) begin
      mode_t m;
      logic [7:0] cin, row, exp;
      logic [12:0] a;
      m.c0_rails = 4'($urandom % 10);
      m.c1_in2 = 1'($urandom);
      m.c2_bypass = ($urandom % 8) == 0;
      set_mode(m);
      ext_in = 13'($urandom); in1 = 8'($urandom); in2 = 8'($urandom);
      cin = m.c1_in2 ? in2 : in1;
      for (int b = 0; b < 8; b++) row[b] = (b < int'(m.c0_rails)) ? cin[b] : ext_in[b];
      a = {ext_in[12:8], row};
      exp = m.c2_bypass ? cin : table_m[a];
      if (m.c2_bypass) n_bypass++;
      if (m.c1_in2) n_in2++;
      if (m.c0_rails != 0) n_rails++;
      // data register holds prev_out the phase
      begin
        logic [7:0] prev_out;
        prev_out = cas_out;
        @(negedge clk);
        @(negedge clk);
        check(cas_out, prev_out, "hold outside phase");
      end
      phase();
      check(cas_out, exp, "evaluate");
      // bypassed block: a write must not reach the core
      if (m.c2_bypass) begin
        wdata = ~table_m[a]; we = 1; bsel = 1;
        phase();
        we = 0; bsel = 0;
        check(cas_out, cin, "bypass output during write");
      end
    end
    if (n_bypass == 0 || n_in2 == 0 || n_rails == 0) failures++;
    // back to no bypass: the table is intact
    set_mode('{c0_rails: 4'd0, c1_in2: 1'b0, c2_bypass: 1'b0});
    for (int t = 0; t < 200; t++) begin
      ext_in = 13'($urandom);
      phase();
      check(cas_out, table_m[ext_in], "table intact after bypass writes");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
