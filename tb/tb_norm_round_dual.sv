// tb_norm_round_dual: normalization and rounding of a 75-bit magnitude whose
// leading one is at position L (from the MSB) while the count given is L or
// L - 1, as the anticipator may deliver. The expected significand, round and
// sticky bits are cut from the magnitude at the true leading one and rounded
// to nearest even; the exponent is exp_ref + (74 - L) - 46, plus one when
// rounding carries out. Both multiplexer inputs must be used.
module tb_norm_round_dual;
  import fma_pkg::*;
  int checks = 0, failures = 0, n_p0 = 0, n_p1 = 0;
  logic [74:0] mag;
  logic [6:0] cnt;
  logic sa;
  exp_int_t eref, eo;
  logic [23:0] sig;
  norm_round_dual dut (.mag(mag), .cnt(cnt), .sticky_a(sa), .exp_ref(eref), .sig(sig), .exp_out(eo));
  int L, k, ee;
  logic [127:0] v;
  longint q, rnd, st;
  initial begin
    for (int t = 0; t < 4000; t++) begin
      L = $urandom_range(1, 74);
      mag = {$urandom, $urandom, $urandom};
      if (t % 4 == 0) mag = {1'b0, {24{1'b1}}, 50'($urandom_range(0, 1)) << 49};
      k = 74 - L;
      for (int i = 74; i > k; i--) mag[i] = 1'b0;
      mag[k] = 1'b1;
      cnt = (L > 1 && $urandom_range(0, 1) == 1) ? 7'(L - 1) : 7'(L);
      if (int'(cnt) == L) n_p0++; else n_p1++;
      sa = (t % 5 == 0);
      eref = exp_int_t'($urandom_range(0, 250));
      #1;
      v = 128'(mag) << (127 - k);            // leading one at bit 127
      q = longint'(v[127:104]);
      rnd = longint'(v[103]);
      st = longint'((|v[102:0]) | sa);
      ee = int'(eref) + k - 46;
      if (rnd == 1 && (st == 1 || q[0])) q = q + 1;
      if (q == 64'h1000000) begin q = 64'h800000; ee++; end
      checks++;
      if (longint'(sig) != q || int'(eo) != ee) begin
        failures++;
        $display("FAIL L=%0d cnt=%0d mag=%h: sig=%h e=%0d want %h e=%0d", L, cnt, mag, sig, eo, q, ee);
      end
    end
    checks++;
    if (n_p0 == 0 || n_p1 == 0) begin failures++; $display("FAIL a path was never taken"); end
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
