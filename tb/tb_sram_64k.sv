// tb_sram_64k: self-checking test of the 64 kbit SRAM core.
// Fills all 8192 words through writes made during the enable phase, checks
// that writes outside the phase or with the core powered off are ignored,
// and reads every word back against a pattern computed here.
module tb_sram_64k;
  logic clk = 0;
  logic ce, pwr_on, we;
  logic [7:0] row, wdata, rdata;
  logic [4:0] col;
  int checks = 0, failures = 0;

  sram_64k dut (.clk, .ce, .pwr_on, .we, .row, .col, .wdata, .rdata);

  always #5 clk = ~clk;

  function automatic logic [7:0] pat(int a);
    return 8'((a * 37) ^ (a >> 5) ^ 8'h5a);
  endfunction

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ce = 0; pwr_on = 1; we = 0; row = 0; col = 0; wdata = 0;
    @(negedge clk);
    // fill
    for (int a = 0; a < 8192; a++) begin
      col = 5'(a >> 8); row = 8'(a); wdata = pat(a); we = 1; ce = 1;
      @(negedge clk);
    end
    ce = 0; we = 0;
    // read back; rdata is 0 outside the phase
    for (int a = 0; a < 8192; a++) begin
      col = 5'(a >> 8); row = 8'(a); ce = 0; #1;
      if (a % 512 == 0) check(rdata, 8'h00, "idle output");
      ce = 1; #1;
      check(rdata, pat(a), "readback");
      @(negedge clk);
    end
    // write without ce: ignored
    col = 5'(100 >> 8); row = 8'(100); wdata = ~pat(100); we = 1; ce = 0;
    @(negedge clk);
    // write while powered off: ignored, read gives 0
    pwr_on = 0; ce = 1; col = 5'(200 >> 8); row = 8'(200); wdata = ~pat(200);
    #1 check(rdata, 8'h00, "powered-off read");
    @(negedge clk);
    pwr_on = 1; we = 0;
    col = 5'(100 >> 8); row = 8'(100); #1 check(rdata, pat(100), "write outside phase ignored");
    col = 5'(200 >> 8); row = 8'(200); #1 check(rdata, pat(200), "write while off ignored");
    // one more write in phase takes effect at the edge
    we = 1; wdata = 8'hc3; col = 5'(8191 >> 8); row = 8'(8191);
    #1 check(rdata, pat(8191), "write not visible before edge");
    @(negedge clk); we = 0;
    #1 check(rdata, 8'hc3, "write visible after edge");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
