// tb_array_multiplier: the carry-save product of the 24x24 multiplier must
// add up to x*y exactly (sum + carry computed in 64 bits, no wrap), for
// corner values and random significands.
module tb_array_multiplier;
  int checks = 0, failures = 0;
  logic [23:0] x, y;
  logic [47:0] s, c;
  array_multiplier #(.N(24)) dut (.x(x), .y(y), .sum(s), .carry(c));
  task automatic check();
    #1;
    checks++;
    if (64'(s) + 64'(c) != 64'(x) * 64'(y)) begin
      failures++;
      $display("FAIL %h * %h : s=%h c=%h", x, y, s, c);
    end
  endtask
  initial begin
    x = '1;      y = '1;      check();
    x = 24'h800000; y = 24'h800000; check();
    x = '0;      y = '1;      check();
    x = 24'hC8DCD6; y = 24'h93EA00; check();
    for (int t = 0; t < 3000; t++) begin
      x = 24'($urandom);
      y = 24'($urandom);
      if (t % 3 == 0) begin x[23] = 1'b1; y[23] = 1'b1; end
      check();
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
