// tb_rail_switch: self-checking test of the rail switch.
// For every rail count 0..15 and random data, the low n_rails bits must come
// from the cascade input and the rest from the external input.
module tb_rail_switch;
  logic [3:0] n_rails;
  logic [7:0] cas_in, ext_in, addr_out, exp;
  int checks = 0, failures = 0;

  rail_switch dut (.n_rails, .cas_in, .ext_in, .addr_out);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 16; n++) begin
      for (int r = 0; r < 20; r++) begin
        n_rails = 4'(n);
        cas_in = 8'($urandom); ext_in = 8'($urandom);
        #1;
        // mask with n ones at the bottom, saturating at 8
        exp = (n >= 8) ? cas_in : ((cas_in & 8'((1 << n) - 1)) | (ext_in & ~8'((1 << n) - 1)));
        checks++;
        if (addr_out !== exp) begin
          failures++;
          $display("FAIL n=%0d cas=%h ext=%h got %h exp %h", n, cas_in, ext_in, addr_out, exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
