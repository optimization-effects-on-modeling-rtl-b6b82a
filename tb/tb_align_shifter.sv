// tb_align_shifter: bit-by-bit reference for the inverter and 74-bit
// alignment shifter. Field bit i holds significand bit i - 50 + shamt (or the
// fill when out of range), inverted for a subtraction; sticky is set when a
// significand 1 would land below field bit 0.
module tb_align_shifter;
  int checks = 0, failures = 0;
  logic [23:0] sig;
  logic inv, st;
  logic [6:0] sh;
  logic [73:0] al, exp_al;
  logic exp_st;
  align_shifter #(.W(74)) dut (.sig(sig), .inv(inv), .shamt(sh), .aligned(al), .sticky(st));
  initial begin
    for (int t = 0; t < 4000; t++) begin
      sig = 24'($urandom) | 24'h800000;
      if (t % 5 == 0) sig = 24'h800000;
      inv = 1'($urandom);
      sh  = 7'($urandom_range(0, 74));
      #1;
      exp_st = 1'b0;
      for (int i = 0; i < 74; i++) begin
        int j;
        j = i - 50 + int'(sh);
        exp_al[i] = ((j >= 0 && j < 24) ? sig[j] : 1'b0) ^ inv;
      end
      for (int j = 0; j < 24; j++)
        if (j + 50 - int'(sh) < 0 && sig[j]) exp_st = 1'b1;
      checks++;
      if (al != exp_al || st != exp_st) begin
        failures++;
        $display("FAIL sig=%h inv=%b sh=%0d al=%h/%h st=%b/%b", sig, inv, sh, al, exp_al, st, exp_st);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
