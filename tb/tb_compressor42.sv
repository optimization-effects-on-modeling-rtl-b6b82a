// tb_compressor42: exhaustive check of the 4:2 compressor slice.
// For all 32 input combinations: x0+x1+x2+x3+cin = sum + 2*(carry+cout),
// and cout does not depend on cin.
module tb_compressor42;
  int checks = 0, failures = 0;
  logic [3:0] x;
  logic cin, s, c, co, s2, c2, co2;
  compressor42 dut  (.x(x), .cin(cin),  .sum(s),  .carry(c),  .cout(co));
  compressor42 dut2 (.x(x), .cin(~cin), .sum(s2), .carry(c2), .cout(co2));
  initial begin
    for (int v = 0; v < 32; v++) begin
      {cin, x} = 5'(v);
      #1;
      checks++;
      if (int'(x[0]) + int'(x[1]) + int'(x[2]) + int'(x[3]) + int'(cin) != int'(s) + 2 * (int'(c) + int'(co))) begin
        failures++;
        $display("FAIL x=%b cin=%b -> s=%b c=%b co=%b", x, cin, s, c, co);
      end
      checks++;
      if (co != co2) begin
        failures++;
        $display("FAIL cout depends on cin for x=%b", x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
