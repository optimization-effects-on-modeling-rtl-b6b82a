// tb_cpa: the 75-bit compound adder against 128-bit arithmetic, random
// operands plus the all-ones wrap cases; both outputs are checked.
module tb_cpa;
  int checks = 0, failures = 0;
  logic [74:0] x, y, s, s1;
  logic [127:0] r;
  cpa #(.W(75)) dut (.x(x), .y(y), .sum(s), .sum_inc(s1));
  initial begin
    for (int t = 0; t < 3000; t++) begin
      x = {$urandom, $urandom, $urandom};
      y = {$urandom, $urandom, $urandom};
      if (t == 0) begin x = '1; y = '0; end
      if (t == 1) begin x = '1; y = 75'(1); end
      #1;
      r = 128'(x) + 128'(y);
      checks++;
      if (s != r[74:0]) begin
        failures++;
        $display("FAIL %h + %h = %h", x, y, s);
      end
      r = r + 128'(1);
      checks++;
      if (s1 != r[74:0]) begin
        failures++;
        $display("FAIL %h + %h + 1 = %h", x, y, s1);
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
