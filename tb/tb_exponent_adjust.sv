// tb_exponent_adjust: every shift amount 0..255 against reference exponents
// spread over the range the datapath produces (including values below 1
// and above 254), compared with exp_ref + 28 - amt in integer arithmetic.
module tb_exponent_adjust;
  import fma_pkg::*;
  int checks = 0, failures = 0;
  exp_int_t   er, eo;
  logic [7:0] amt;
  exponent_adjust dut (.exp_ref(er), .amt(amt), .exp_out(eo));
  initial begin
    for (int k = 0; k < 24; k++) begin
      int r;
      r = (k < 4) ? (k * 100 - 150) : $urandom_range(0, 500) - 150;
      for (int m = 0; m < 256; m++) begin
        int want;
        er  = exp_int_t'(r);
        amt = 8'(m);
        #1;
        want = r + 28 - m;
        checks++;
        if (int'(eo) != want) begin
          failures++;
          $display("FAIL exp_ref=%0d amt=%0d: got %0d want %0d", r, m, eo, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
