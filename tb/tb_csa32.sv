// tb_csa32: random check of the 48-bit 3:2 carry-save row:
// x + y + z = sum + 2*carry, computed in 64-bit arithmetic.
module tb_csa32;
  int checks = 0, failures = 0;
  logic [47:0] x, y, z, s, c;
  csa32 #(.W(48)) dut (.x(x), .y(y), .z(z), .sum(s), .carry(c));
  initial begin
    for (int t = 0; t < 2000; t++) begin
      x = {$urandom, $urandom};
      y = {$urandom, $urandom};
      z = (t == 0) ? '1 : {$urandom, $urandom};
      if (t == 0) begin x = '1; y = '1; end
      #1;
      checks++;
      if (64'(x) + 64'(y) + 64'(z) != 64'(s) + (64'(c) << 1)) begin
        failures++;
        $display("FAIL x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
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
