// tb_lzd: the 128-bit leading-one detector against a first-one search on
// patterns with a chosen leading position, plus the all-zero pattern; and an
// 8-bit instance checked on the rows of the published 8-bit truth table
// (1xxx xxxx -> 0, 0001 xxxx -> 3, 0000 1xxx -> 4, 0000 0001 -> 7, 0 -> not valid).
module tb_lzd;
  int checks = 0, failures = 0;
  logic [0:127] b;
  logic [6:0] pos;
  logic v;
  logic [0:7] b8;
  logic [2:0] pos8;
  logic v8;
  lzd #(.N(128)) dut  (.b(b), .pos(pos), .valid(v));
  lzd #(.N(8))   dut8 (.b(b8), .pos(pos8), .valid(v8));
  int lead;
  initial begin
    for (int t = 0; t < 3000; t++) begin
      lead = $urandom_range(0, 128);
      b = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 128; i++) begin
        if (i < lead) b[i] = 1'b0;
        else if (i == lead) b[i] = 1'b1;
      end
      #1;
      checks++;
      if (lead == 128) begin
        if (v) begin failures++; $display("FAIL all-zero reported valid"); end
      end else if (!v || int'(pos) != lead) begin
        failures++;
        $display("FAIL lead=%0d pos=%0d v=%b", lead, pos, v);
      end
    end
    b8 = 8'b1011_0110; #1; checks++; if (pos8 != 3'd0 || !v8) failures++;
    b8 = 8'b0001_1111; #1; checks++; if (pos8 != 3'd3 || !v8) failures++;
    b8 = 8'b0000_1010; #1; checks++; if (pos8 != 3'd4 || !v8) failures++;
    b8 = 8'b0000_0011; #1; checks++; if (pos8 != 3'd6 || !v8) failures++;
    b8 = 8'b0000_0001; #1; checks++; if (pos8 != 3'd7 || !v8) failures++;
    b8 = 8'b0000_0000; #1; checks++; if (v8) failures++;
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
