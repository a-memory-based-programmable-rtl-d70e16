// tb_lut_cascade_lsi: end-to-end test of the LUT cascade device at its
// full size (eight 8192 x 8 tables, default parameters).
//
// 1. Programs every word of all eight tables through the WE/BS/DATA bus in
//    the 9-phase mode: one I/O period per address, block i written in its
//    own phase i. Table contents are f(block, address) below.
// 2. Runs a series of cascade configurations, each for many I/O periods of
//    random inputs:
//      - single 8-block loop (9 phases per I/O period), starting at block 0
//        and at another block;
//      - two 4-block loops {0,1,6,7} and {2,3,4,5} (5 phases);
//      - two 4-block rows 0..3 and 4..7 (5 phases);
//      - four 2-block loops (3 phases), random direction in each loop;
//      - the 4+2+2 mapping 4->5->2->3, 7->0, 6->1 (5 phases);
//      - single loops with one or two blocks bypassed.
//    A reference model here evaluates every block phase by phase from the
//    configuration and the tables and predicts all 64 output pins.
// 3. Checks at every clock that the outputs hold the previous I/O period's
//    results and change only at the I/O clock edge, i.e. one I/O period
//    (9, 5 or 3 clocks) of latency.
// Each mechanism (the three loop sizes, the 4+2+2 mix, IN2 links, partial
// rails, bypass, a cascade head other than block 0, table writes) is
// counted and must occur.
module tb_lut_cascade_lsi;
  import lutc_pkg::*;

  logic clk = 0, rst_n = 0, io_clk = 0;
  logic [25:0] in_a, in_b, in_c, in_d;
  logic [15:0] out_a, out_b, out_c, out_d;
  logic we = 0;
  logic [2:0] bs = 0;
  logic [7:0] data = 0;
  logic mode_set = 0, phase_set = 0;
  mode_t mode_in = '0;
  logic [2:0] phase_in = 0;

  lut_cascade_lsi dut (
    .clk, .rst_n, .io_clk, .in_a, .in_b, .in_c, .in_d,
    .out_a, .out_b, .out_c, .out_d, .we, .bs, .data,
    .mode_set, .mode_in, .phase_set, .phase_in
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_single = 0, n_dual = 0, n_quad = 0, n_422 = 0, n_in2 = 0;
  int n_rails = 0, n_bypass = 0, n_head = 0, n_writes = 0;

  // configuration as the model sees it
  int    ratio = 9;
  int    cfg_ph [8];
  mode_t cfg_md [8];
  logic [12:0] ext [8];
  logic [7:0]  mout [8];      // model of each block's data register
  logic [7:0]  exp_pin [8];   // expected output pins
  int          skip = 0;      // I/O periods left before checking resumes

  function automatic logic [7:0] f(int b, int a);
    return 8'((a * 131) ^ (b * 29) ^ (a >> 4) ^ (b << 5) ^ ((a >> 9) * 7));
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [7:0] pin_of(int b);
    case (b)
      0: return out_a[7:0];   1: return out_a[15:8];
      2: return out_b[7:0];   3: return out_b[15:8];
      4: return out_c[7:0];   5: return out_c[15:8];
      6: return out_d[7:0];   default: return out_d[15:8];
    endcase
  endfunction

  task automatic check_pins(string what);
    for (int b = 0; b < 8; b++) begin
      checks++;
      if (pin_of(b) !== exp_pin[b]) begin
        failures++;
        if (failures < 20)
          $display("FAIL %s: block %0d out %h exp %h (t=%0t)", what, b, pin_of(b), exp_pin[b], $time);
      end
    end
  endtask

  // Model of one I/O period: blocks fire phase by phase; blocks on the same
  // phase all see the values from before that phase.
  task automatic model_period();
    logic [7:0] nxt [8];
    for (int k = 0; k < ratio - 1; k++) begin
      for (int b = 0; b < 8; b++) nxt[b] = mout[b];
      for (int b = 0; b < 8; b++) begin
        if (cfg_ph[b] == k) begin
          logic [7:0] cin, row;
          cin = cfg_md[b].c1_in2 ? mout[7 - b] : mout[(b + 7) % 8];
          for (int i = 0; i < 8; i++) row[i] = (i < int'(cfg_md[b].c0_rails)) ? cin[i] : ext[b][i];
          nxt[b] = cfg_md[b].c2_bypass ? cin : f(b, int'({ext[b][12:8], row}));
        end
      end
      for (int b = 0; b < 8; b++) mout[b] = nxt[b];
    end
  endtask

  // One I/O period with the current ext[]; inputs change at the I/O edge.
  // wr_blk/wr_data: optional per-phase table writes (wr_en[k] for phase k).
  task automatic io_period(input bit wr_en [8], input logic [7:0] wr_data [8]);
    for (int cnt = 0; cnt < ratio; cnt++) begin
      @(negedge clk);
      if (cnt == 0) begin
        // last clock of the previous period: outputs must still hold
        if (skip == 0) check_pins("hold until I/O edge");
        io_clk = 1;
        in_a = {ext[1], ext[0]}; in_b = {ext[3], ext[2]};
        in_c = {ext[5], ext[4]}; in_d = {ext[7], ext[6]};
        we = 0;
      end else begin
        if (cnt == (ratio + 1) / 2) io_clk = 0;
        if (cnt == 1) begin
          // the I/O edge has passed: the previous period's results are out
          for (int b = 0; b < 8; b++) exp_pin[b] = mout[b];
          if (skip > 0) skip--;
        end
        if (skip == 0) check_pins("output after one I/O period");
        // phase cnt-1 is high in the coming clock
        we = 0;
        if (cnt - 1 < 8 && wr_en[cnt - 1]) begin
          we = 1; bs = 3'(cnt - 1); data = wr_data[cnt - 1];
          n_writes++;
        end
      end
    end
  endtask

  task automatic plain_period();
    bit no_wr [8];
    logic [7:0] nd [8];
    for (int b = 0; b < 8; b++) begin no_wr[b] = 0; nd[b] = 0; end
    io_period(no_wr, nd);
    model_period();
  endtask

  // Load the configuration in cfg_ph/cfg_md into the device.
  task automatic load_config(int new_ratio);
    for (int b = 0; b < 8; b++) begin
      @(negedge clk);
      mode_set = 1; phase_set = 1; bs = 3'(b);
      mode_in = cfg_md[b]; phase_in = 3'(cfg_ph[b]);
    end
    @(negedge clk);
    mode_set = 0; phase_set = 0;
    // let the I/O clock finish its period before changing the ratio
    while (io_clk) @(negedge clk);
    ratio = new_ratio;
    skip = 3;
  endtask

  // Build a configuration from chains of blocks, each given in cascade
  // order; every block not in a chain is a stand-alone head.
  int chains [$][$];
  int bypass_pick;

  task automatic build_config(int new_ratio, bit with_bypass);
    for (int b = 0; b < 8; b++) begin
      cfg_ph[b] = 0;
      cfg_md[b] = '{c0_rails: 4'd0, c1_in2: 1'b0, c2_bypass: 1'b0};
    end
    foreach (chains[c]) begin
      for (int j = 0; j < chains[c].size(); j++) begin
        int b, a;
        b = chains[c][j];
        cfg_ph[b] = j;
        if (j == 0) begin
          if (b != 0) n_head++;
        end else begin
          a = chains[c][j - 1];
          if (a == (b + 7) % 8) cfg_md[b].c1_in2 = 0;
          else if (a == 7 - b) begin cfg_md[b].c1_in2 = 1; n_in2++; end
          else begin failures++; $display("FAIL bad chain link %0d->%0d", a, b); end
          cfg_md[b].c0_rails = 4'(1 + $urandom % 8);
          if (cfg_md[b].c0_rails < 8) n_rails++;
          if (with_bypass && j == bypass_pick) begin
            cfg_md[b].c2_bypass = 1;
            n_bypass++;
          end
        end
        if (j > new_ratio - 2) begin failures++; $display("FAIL chain too long"); end
      end
    end
    load_config(new_ratio);
  endtask

  task automatic run_periods(int n);
    for (int t = 0; t < n; t++) begin
      for (int b = 0; b < 8; b++) ext[b] = 13'($urandom);
      plain_period();
    end
  endtask

  initial begin
    bit wr_en [8];
    logic [7:0] wd [8];
    in_a = 0; in_b = 0; in_c = 0; in_d = 0;
    for (int b = 0; b < 8; b++) begin mout[b] = 0; exp_pin[b] = 0; ext[b] = 0; end
    for (int b = 0; b < 8; b++) begin
      cfg_ph[b] = b;
      cfg_md[b] = '0;
    end
    #23 rst_n = 1;
    skip = 1000000;   // no output checks while programming

    // 1. program all tables: reset state is 9 phases, block i on phase i, c0 = 0
    for (int a = 0; a < 8192; a++) begin
      for (int b = 0; b < 8; b++) begin
        ext[b] = 13'(a); wr_en[b] = 1; wd[b] = f(b, a);
      end
      io_period(wr_en, wd);
    end
    for (int b = 0; b < 8; b++) wr_en[b] = 0;
    io_period(wr_en, wd);

    // 2a. single 8-block loop starting at block 0, then at block 5
    chains = '{'{0, 1, 2, 3, 4, 5, 6, 7}};
    build_config(9, 0);
    run_periods(300); n_single++;
    chains = '{'{5, 6, 7, 0, 1, 2, 3, 4}};
    build_config(9, 0);
    run_periods(300); n_single++;

    // 2b. dual 4-block loops, random start in each loop
    for (int r = 0; r < 4; r++) begin
      automatic int l0 [4] = '{0, 1, 6, 7};
      automatic int l1 [4] = '{2, 3, 4, 5};
      automatic int s0 = $urandom % 4, s1 = $urandom % 4;
      chains = '{'{l0[s0], l0[(s0 + 1) % 4], l0[(s0 + 2) % 4], l0[(s0 + 3) % 4]},
                 '{l1[s1], l1[(s1 + 1) % 4], l1[(s1 + 2) % 4], l1[(s1 + 3) % 4]}};
      build_config(5, 0);
      run_periods(200); n_dual++;
    end

    // 2c. two 4-block rows
    chains = '{'{0, 1, 2, 3}, '{4, 5, 6, 7}};
    build_config(5, 0);
    run_periods(200); n_dual++;

    // 2d. four 2-block loops, random direction
    for (int r = 0; r < 4; r++) begin
      chains = {};
      for (int i = 0; i < 4; i++) begin
        if (($urandom % 2) != 0) chains.push_back('{i, 7 - i});
        else              chains.push_back('{7 - i, i});
      end
      build_config(3, 0);
      run_periods(200); n_quad++;
    end

    // 2e. 4+2+2 mapping
    chains = '{'{4, 5, 2, 3}, '{7, 0}, '{6, 1}};
    build_config(5, 0);
    run_periods(300); n_422++;

    // 2f. bypass (redundancy): one block of a single loop skipped
    for (int r = 0; r < 3; r++) begin
      bypass_pick = 1 + $urandom % 7;
      chains = '{'{0, 1, 2, 3, 4, 5, 6, 7}};
      build_config(9, 1);
      run_periods(200);
    end

    // 2g. back to the 8-block loop: tables untouched by the bypass runs
    chains = '{'{0, 1, 2, 3, 4, 5, 6, 7}};
    build_config(9, 0);
    run_periods(100); n_single++;

    $display("mechanisms: single=%0d dual=%0d quad=%0d 4+2+2=%0d in2=%0d partial_rails=%0d bypass=%0d head!=0=%0d writes=%0d",
             n_single, n_dual, n_quad, n_422, n_in2, n_rails, n_bypass, n_head, n_writes);
    if (n_single == 0) begin failures++; $display("FAIL single loop never run"); end
    if (n_dual == 0)   begin failures++; $display("FAIL dual loops never run"); end
    if (n_quad == 0)   begin failures++; $display("FAIL quad loops never run"); end
    if (n_422 == 0)    begin failures++; $display("FAIL 4+2+2 never run"); end
    if (n_in2 == 0)    begin failures++; $display("FAIL IN2 never used"); end
    if (n_rails == 0)  begin failures++; $display("FAIL partial rails never used"); end
    if (n_bypass == 0) begin failures++; $display("FAIL bypass never used"); end
    if (n_head == 0)   begin failures++; $display("FAIL no cascade started away from block 0"); end
    if (n_writes != 8 * 8192) begin failures++; $display("FAIL writes %0d", n_writes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
