// tb_lza: property check of the leading-zero anticipator. Operands are
// shaped like those of the FMA's final adder (x carries the sign, y has its
// 26 upper bits clear) and often nearly cancel; as in the FMA the carry-in
// is 1 exactly when x carries an inverted addend (x[74] set). For the sum
// x + y + cin, the string matching its sign must have its first 1 at a
// position c with the magnitude's leading one (counted from the MSB) at c
// or c + 1. The magnitude of a negative sum is NOT(x + y).
// Both the exact case and the one-short case must occur.
module tb_lza;
  int checks = 0, failures = 0, n_exact = 0, n_short = 0, n_neg = 0;
  logic [74:0] x, y, s, mag;
  logic cin;
  logic [0:74] ps, ns, str;
  lza #(.W(75)) dut (.x(x), .y(y), .pos(ps), .neg(ns));
  int lead, c;
  initial begin
    for (int t = 0; t < 20000; t++) begin
      y = {26'b0, $urandom, $urandom} & {26'b0, 49'h1_FFFF_FFFF_FFFF};
      case (t % 4)
        0: x = {$urandom, $urandom, $urandom};
        1: x = ~{26'b0, y[48:0]} ^ 75'($urandom_range(0, 255));   // near cancellation
        2: x = ~{26'b0, y[48:0]};                                 // x + y = -1
        default: x = {1'b1, 74'($urandom) << $urandom_range(0, 60)} ;
      endcase
      if (!x[74]) x[73] = 1'b0;   // keep a positive x + y inside the signed range
      cin = x[74];
      #1;
      s = x + y + 75'(cin);
      mag = s[74] ? ~(x + y) : s;
      if (mag == 0) continue;
      lead = 0;
      for (int i = 74; i >= 0; i--) if (mag[i]) begin lead = 74 - i; break; end
      str = s[74] ? ns : ps;
      c = 75;
      for (int i = 0; i < 75; i++) if (str[i]) begin c = i; break; end
      if (s[74]) n_neg++;
      checks++;
      if (lead == c) n_exact++;
      else if (lead == c + 1) n_short++;
      else begin
        failures++;
        $display("FAIL x=%h y=%h cin=%b lead=%0d c=%0d", x, y, cin, lead, c);
      end
    end
    checks++;
    if (n_exact == 0 || n_short == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL coverage exact=%0d short=%0d neg=%0d", n_exact, n_short, n_neg);
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
