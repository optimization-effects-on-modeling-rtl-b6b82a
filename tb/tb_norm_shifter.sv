// tb_norm_shifter: the left shifter against a bit loop, shift counts
// 0..80 (counts of 75 and more give zero).
module tb_norm_shifter;
  int checks = 0, failures = 0;
  logic [74:0] x, y, e;
  logic [7:0] amt;
  norm_shifter #(.W(75), .CW(8)) dut (.x(x), .amt(amt), .y(y));
  initial begin
    for (int t = 0; t < 3000; t++) begin
      x = {$urandom, $urandom, $urandom};
      amt = 8'($urandom_range(0, 80));
      #1;
      for (int i = 0; i < 75; i++) e[i] = (i - int'(amt) >= 0) ? x[i - int'(amt)] : 1'b0;
      checks++;
      if (y != e) begin
        failures++;
        $display("FAIL x=%h amt=%0d", x, amt);
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
