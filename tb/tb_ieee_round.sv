// tb_ieee_round: round to nearest even against a quarter-ulp integer model:
// v = 4*sig + 2*rnd + sticky, q = v/4, rem = v%4, round up when rem > 2 or
// (rem == 2 and q odd); a carry to 2^24 gives 2^23 and exponent + 1.
module tb_ieee_round;
  import fma_pkg::*;
  int checks = 0, failures = 0, n_carry = 0;
  logic [23:0] sig, so;
  logic rnd, st;
  exp_int_t ei, eo;
  longint q, rem;
  int ee;
  ieee_round dut (.sig(sig), .rnd(rnd), .sticky(st), .exp_in(ei), .sig_out(so), .exp_out(eo));
  initial begin
    for (int t = 0; t < 4000; t++) begin
      sig = 24'($urandom) | 24'h800000;
      if (t % 7 == 0) sig = 24'hFFFFFF;
      if (t % 11 == 0) sig = 24'h800000 | 24'($urandom_range(0, 3));
      rnd = 1'($urandom);
      st  = 1'($urandom);
      ei  = exp_int_t'($urandom_range(0, 300)) - exp_int_t'(20);
      #1;
      q   = longint'(sig);
      rem = 2 * longint'(rnd) + longint'(st);
      if (rem > 2 || (rem == 2 && q[0])) q = q + 1;
      ee = int'(ei);
      if (q == 64'h1000000) begin q = 64'h800000; ee = ee + 1; n_carry++; end
      checks++;
      if (longint'(so) != q || int'(eo) != ee) begin
        failures++;
        $display("FAIL sig=%h rnd=%b st=%b -> %h e=%0d, want %h e=%0d", sig, rnd, st, so, eo, q, ee);
      end
    end
    checks++;
    if (n_carry == 0) begin failures++; $display("FAIL rounding carry never exercised"); end
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
