// tb_complementer: with neg set the output must be the bitwise inverse
// (the magnitude of x + 1 when x + 1 is negative), otherwise x unchanged.
// The expected magnitude is computed as 0 - (x + 1) for negative inputs.
module tb_complementer;
  int checks = 0, failures = 0;
  logic [74:0] x, m, e;
  logic n;
  complementer #(.W(75)) dut (.x(x), .neg(n), .mag(m));
  initial begin
    for (int t = 0; t < 2000; t++) begin
      x = {$urandom, $urandom, $urandom};
      if (t == 1) x = {1'b1, 74'b0};
      if (t == 2) x = '1;
      n = x[74];
      #1;
      e = n ? 75'(0) - (x + 75'(1)) : x;
      checks++;
      if (m != e) begin
        failures++;
        $display("FAIL x=%h mag=%h exp=%h", x, m, e);
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
