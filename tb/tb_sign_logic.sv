// tb_sign_logic: all eight sign combinations. The expected values are
// worked out with signed integers: the product sign is that of
// (+-1)*(+-1), an effective subtraction is a negative product of the
// addend's and product's unit signs, and an exact zero takes +0 when the
// terms cancel, the addend's sign otherwise.
module tb_sign_logic;
  int checks = 0, failures = 0;
  logic sa, sb, sc, sp, sub, zs;
  sign_logic dut (.sign_a(sa), .sign_b(sb), .sign_c(sc),
                  .sign_p(sp), .sub(sub), .zero_sign(zs));
  initial begin
    for (int t = 0; t < 8; t++) begin
      int ua, ub, uc, up;
      logic e_sp, e_sub, e_zs;
      {sa, sb, sc} = 3'(t);
      #1;
      ua = sa ? -1 : 1;
      ub = sb ? -1 : 1;
      uc = sc ? -1 : 1;
      up = ub * uc;
      e_sp  = (up < 0);
      e_sub = (ua * up < 0);
      e_zs  = e_sub ? 1'b0 : (ua < 0);
      checks++;
      if ({sp, sub, zs} !== {e_sp, e_sub, e_zs}) begin
        failures++;
        $display("FAIL signs a=%b b=%b c=%b: got %b%b%b want %b%b%b",
                 sa, sb, sc, sp, sub, zs, e_sp, e_sub, e_zs);
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
