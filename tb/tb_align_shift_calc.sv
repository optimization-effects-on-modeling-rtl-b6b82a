// tb_align_shift_calc: checks the alignment shift 27 - (ea - (eb + ec - 127)),
// its clamping, the psmall-product flag and the reference exponent against
// integer arithmetic done here, over all zero-flag cases and random exponents.
module tb_align_shift_calc;
  import fma_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] ea, eb, ec;
  logic az, pz, psmall;
  logic [6:0] shamt;
  exp_int_t eref;
  align_shift_calc dut (.exp_a(ea), .exp_b(eb), .exp_c(ec), .a_zero(az), .p_zero(pz),
                        .shamt(shamt), .prod_small(psmall), .exp_ref(eref));
  int ep, d, sh, e_shamt, e_ref, e_small;
  initial begin
    for (int t = 0; t < 5000; t++) begin
      ea = 8'($urandom_range(1, 254));
      eb = 8'($urandom_range(1, 254));
      ec = 8'($urandom_range(1, 254));
      if (t % 4 == 1) ea = 8'(int'(eb) + int'(ec) - 127 + $urandom_range(0, 60) - 30);
      if (ea == 0) ea = 1;
      az = (t % 17 == 3);
      pz = (t % 13 == 5);
      #1;
      ep = int'(eb) + int'(ec) - 127;
      d  = int'(ea) - ep;
      sh = 27 - d;
      e_small = 0;
      if (az) begin
        e_shamt = 74; e_ref = ep;
      end else if (pz) begin
        e_shamt = 0; e_ref = int'(ea) - 27;
      end else if (sh < 0) begin
        e_shamt = 0; e_ref = int'(ea) - 27; e_small = 1;
      end else begin
        e_shamt = (sh > 74) ? 74 : sh; e_ref = ep;
      end
      checks++;
      if (int'(shamt) != e_shamt || int'(eref) != e_ref || int'(psmall) != e_small) begin
        failures++;
        $display("FAIL ea=%0d eb=%0d ec=%0d az=%b pz=%b: shamt=%0d/%0d ref=%0d/%0d psmall=%b",
                 ea, eb, ec, az, pz, shamt, e_shamt, eref, e_ref, psmall);
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
