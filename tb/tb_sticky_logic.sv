// tb_sticky_logic: the sticky bit is 1 exactly when one of the 50 bits or
// the external flag is 1; single-bit patterns at every position are tried.
module tb_sticky_logic;
  int checks = 0, failures = 0;
  logic [49:0] bits;
  logic ext, st, e;
  sticky_logic #(.W(50)) dut (.bits(bits), .ext(ext), .sticky(st));
  initial begin
    for (int t = 0; t < 200; t++) begin
      if (t < 50) bits = 50'(1) << t;
      else if (t < 60) bits = '0;
      else bits = {$urandom, $urandom} & {$urandom, $urandom};
      ext = (t >= 50 && t < 55) ? 1'b1 : (t < 50 ? 1'b0 : 1'($urandom));
      #1;
      e = 1'b0;
      for (int i = 0; i < 50; i++) if (bits[i]) e = 1'b1;
      e = e | ext;
      checks++;
      if (st != e) begin
        failures++;
        $display("FAIL bits=%h ext=%b st=%b", bits, ext, st);
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
