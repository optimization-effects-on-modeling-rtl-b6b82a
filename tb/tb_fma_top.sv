// tb_fma_top: end-to-end test of the pipelined single-precision FMA
// (result = a + b*c) at its default configuration.
//
// Reference model: both terms are placed exactly in a 720-bit fixed-point
// number (LSB weight 2^-400), added or subtracted as signed magnitudes, and
// the exact sum is rounded to 24 bits, nearest even. Exponents above 254
// give infinity, below 1 a signed zero; subnormal inputs count as zero; NaN
// and infinity follow IEEE-754 with a default quiet NaN 7fc00000. This
// shares no structure with the design (no alignment window, no LZA).
//
// Stimulus: the operand sets of the published simulation examples (with the
// values named in their captions), directed cases for each mechanism, and
// random operands, one new operation per clock. The result of an operation
// is expected exactly three clock edges after it is applied (latency 3,
// throughput 1). Each mechanism of the datapath is counted from the design's
// internal signals, and one that never happens counts as a failure.
module tb_fma_top;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [31:0] a, b, c, result;

  fma_top dut (.clk(clk), .a(a), .b(b), .c(c), .result(result));

  always #5 clk = ~clk;

  // ---------------------------------------------------------------- model
  localparam int FW = 720;
  localparam int OFF = 400;

  function automatic logic [31:0] ref_fma(logic [31:0] ra, logic [31:0] rb, logic [31:0] rc);
    logic sa, sb, sc, sp, rs;
    int ea, eb, ec;
    logic [FW-1:0] ma, mp, mr;
    logic a_nan, b_nan, c_nan, a_inf, b_inf, c_inf, a_z, b_z, c_z, p_inf;
    int k, e;
    logic [31:0] q;
    logic rnd, st;
    sa = ra[31]; sb = rb[31]; sc = rc[31]; sp = sb ^ sc;
    ea = int'(ra[30:23]); eb = int'(rb[30:23]); ec = int'(rc[30:23]);
    a_z = (ea == 0); b_z = (eb == 0); c_z = (ec == 0);
    a_inf = (ea == 255) && (ra[22:0] == 0); a_nan = (ea == 255) && (ra[22:0] != 0);
    b_inf = (eb == 255) && (rb[22:0] == 0); b_nan = (eb == 255) && (rb[22:0] != 0);
    c_inf = (ec == 255) && (rc[22:0] == 0); c_nan = (ec == 255) && (rc[22:0] != 0);
    if (a_nan || b_nan || c_nan || (b_inf && c_z) || (c_inf && b_z)) return 32'h7fc00000;
    p_inf = b_inf || c_inf;
    if (p_inf && a_inf && (sa != sp)) return 32'h7fc00000;
    if (p_inf) return {sp, 8'hff, 23'd0};
    if (a_inf) return {sa, 8'hff, 23'd0};
    ma = '0; mp = '0;
    if (!a_z) ma = FW'({1'b1, ra[22:0]}) << (ea - 150 + OFF);
    if (!b_z && !c_z) mp = (FW'({1'b1, rb[22:0]}) * FW'({1'b1, rc[22:0]})) << (eb + ec - 300 + OFF);
    if (sa == sp) begin
      mr = ma + mp; rs = sa;
    end else if (mp >= ma) begin
      mr = mp - ma; rs = sp;
    end else begin
      mr = ma - mp; rs = sa;
    end
    if (mr == '0) return {((sa == sp) ? sa : 1'b0), 31'd0};
    k = 0;
    for (int i = FW - 1; i >= 0; i--) if (mr[i]) begin k = i; break; end
    e = k - OFF + 127;
    q   = 32'(mr >> (k - 23));
    rnd = mr[k-24];
    st  = 1'b0;
    for (int i = 0; i < k - 24; i++) if (mr[i]) st = 1'b1;
    if (rnd && (st || q[0])) q = q + 1;
    if (q == 32'h1000000) begin q = 32'h800000; e = e + 1; end
    if (e >= 255) return {rs, 8'hff, 23'd0};
    if (e <= 0) return {rs, 31'd0};
    return {rs, 8'(e), q[22:0]};
  endfunction

  // ------------------------------------------------------------- stimulus
  localparam int NDIR = 40;
  logic [31:0] dir_a [NDIR], dir_b [NDIR], dir_c [NDIR];
  int ndir = 0;
  task automatic add(logic [31:0] va, logic [31:0] vb, logic [31:0] vc);
    dir_a[ndir] = va; dir_b[ndir] = vb; dir_c[ndir] = vc; ndir++;
  endtask

  // expected results in flight (latency 3)
  logic [31:0] exp_q [$];
  logic [95:0] op_q [$];
  int n_ops = 0;

  // published examples, expected values as printed in the result panels
  int n_paper = 0;
  logic [31:0] paper_res [8];
  logic        paper_chk [8];

  // mechanism counters
  int n_sub = 0, n_neg = 0, n_path1 = 0, n_small = 0, n_sticky_a = 0, n_rnd_up = 0,
      n_rnd_carry = 0, n_ovf = 0, n_unf = 0, n_spc = 0, n_zero = 0, n_pzero = 0, n_clamp = 0;

  always @(posedge clk) begin
    // stage 1 inputs
    if (dut.sub) n_sub++;
    if (dut.prod_small) n_small++;
    if (dut.sticky_a) n_sticky_a++;
    if (dut.p_zero && !dut.a_zero) n_pzero++;
    if (dut.u_shcalc.sh > 74 && !dut.a_zero && !dut.p_zero) n_clamp++;
    // stage 2: sums that come out negative and are complemented
    if (dut.s1_q.special == fma_pkg::SPC_NONE && dut.neg2) n_neg++;
    // stage 3
    if (dut.s2_q.special == fma_pkg::SPC_NONE) begin
      if (dut.s2_q.mag != 0) begin
        if (!dut.u_nr.ok0) n_path1++;
        if (dut.exp3 >= 255) n_ovf++;
        if (dut.exp3 <= 0) n_unf++;
        if (dut.u_nr.ok0 ? dut.u_nr.u_p0.u_round.up : dut.u_nr.u_p1.u_round.up) n_rnd_up++;
        if (dut.u_nr.ok0 ? dut.u_nr.u_p0.u_round.s[24] : dut.u_nr.u_p1.u_round.s[24]) n_rnd_carry++;
      end else n_zero++;
    end else n_spc++;
  end

  function automatic logic [31:0] rnd_op(int kind);
    logic [31:0] v;
    v = $urandom;
    case (kind)
      0: v[30:23] = 8'($urandom_range(100, 154));       // moderate range
      1: v[30:23] = 8'($urandom_range(1, 254));         // full range
      default: ;
    endcase
    return v;
  endfunction

  task automatic apply(logic [31:0] va, logic [31:0] vb, logic [31:0] vc);
    a = va; b = vb; c = vc;
    exp_q.push_back(ref_fma(va, vb, vc));
    op_q.push_back({va, vb, vc});
    @(posedge clk);
    #1;
    n_ops++;
  endtask

  int n_cycles = 0;
  always @(posedge clk) n_cycles++;

  // compare: an operation sampled at edge n (the first of its three edges)
  // has its result in the output register after edge n + 2
  int issued_at [$];
  always @(posedge clk) begin
    #2;
    if (issued_at.size() > 0 && n_cycles - issued_at[0] == 2) begin
      logic [31:0] e;
      logic [95:0] o;
      void'(issued_at.pop_front());
      e = exp_q.pop_front();
      o = op_q.pop_front();
      checks++;
      if (result !== e) begin
        failures++;
        if (failures < 20)
          $display("FAIL a=%h b=%h c=%h: result=%h expected=%h", o[95:64], o[63:32], o[31:0], result, e);
      end
    end
  end

  task automatic issue(logic [31:0] va, logic [31:0] vb, logic [31:0] vc);
    issued_at.push_back(n_cycles + 1);
    apply(va, vb, vc);
  endtask

  initial begin
    a = '0; b = '0; c = '0;
    repeat (2) @(posedge clk);
    #1;
    // published examples (caption values); the checked results are listed
    // in the README together with the printed panels
    issue(32'h00000000, 32'h00000000, 32'h00000000);   // A=0, B=0, C=0
    issue(32'h00000000, 32'h455E3000, 32'h4739F000);   // A=0, B=3555, C=47600
    issue(32'h3F800000, 32'h49516570, 32'hC94F8500);   // A=1, B=857687, C=-850000
    issue(32'h2EDBE6FF, 32'h49516570, 32'hC94F8500);   // A=1e-10, same B, C
    issue(32'h4752F000, 32'h00000000, 32'h4739F000);   // A=54000, B=0, C=47600
    issue(32'h4752F000, 32'h455E3000, 32'hC739F000);   // A=54000, B=3555, C=-47600
    issue(32'hC6B81E00, 32'hC58FB800, 32'hBB1B5200);   // A=-23567, B=-4599, C=-0.00237
    // directed mechanisms
    issue(32'h40000000, 32'hBF800000, 32'h3F800000);   // 2 - 1: negative power-of-two sum
    issue(32'h3F800000, 32'hBF800000, 32'h3F800000);   // 1 - 1 = +0
    issue(32'h3F800001, 32'hBF800000, 32'h3F800000);   // massive cancellation
    issue(32'h4B800000, 32'h3F000000, 32'h3F800000);   // 2^24 + 0.5: tie to even
    issue(32'h4B800000, 32'h3F000001, 32'h3F800000);   // just above the tie
    issue(32'h4B800000, 32'hBF000001, 32'h3F800000);   // far product below, subtracted
    issue(32'h4B800000, 32'h33800000, 32'h33800000);   // product tiny: sticky only
    issue(32'hCB800000, 32'h33800000, 32'h33800000);   // same, effective subtraction
    issue(32'h00800000, 32'h7F000000, 32'h7F000000);   // overflow to infinity
    issue(32'h00000000, 32'h00800000, 32'h00800000);   // underflow to zero
    issue(32'h7F800000, 32'h3F800000, 32'h3F800000);   // inf + 1
    issue(32'h7F800000, 32'hFF800000, 32'h3F800000);   // inf - inf = NaN
    issue(32'h3F800000, 32'h7F800000, 32'h00000000);   // inf * 0 = NaN
    issue(32'h3F800000, 32'h7FC00001, 32'h3F800000);   // NaN operand
    issue(32'h3F7FFFFF, 32'h3F800000, 32'h33800000);   // rounding carries into new binade
    issue(32'h33800000, 32'h3F800000, 32'h3F800000);   // addend shifted out (sticky)
    issue(32'hB3800001, 32'h3F800000, 32'h3F800000);   // addend shifted out, subtracted
    issue(32'h80000000, 32'h80000000, 32'h3F800000);   // -0 + -0*1 = -0
    // random operations, back to back
    for (int t = 0; t < 30000; t++) begin
      logic [31:0] ra, rb, rc;
      rb = rnd_op(0); rc = rnd_op(0);
      ra = rnd_op(t % 5 == 0 ? 1 : 0);
      if (t % 3 == 0) begin
        // addend close to the product: cancellation and the LZA's one-short case
        ra = ref_fma(32'h0, rb, rc) ^ 32'h80000000;
        ra[9:0] = 10'($urandom);
        if ($urandom_range(0, 1) == 1) ra[30:23] = ra[30:23] + 8'($urandom_range(0, 2)) - 8'd1;
      end
      if (t % 7 == 1) begin rb = rnd_op(1); rc = rnd_op(1); end
      if (t % 97 == 5) ra[30:23] = 8'h00;
      if (t % 89 == 3) rb[30:23] = 8'h00;
      issue(ra, rb, rc);
    end
    repeat (4) @(posedge clk);
    #3;
    // every mechanism must have been exercised
    checks++; if (n_sub == 0)       begin failures++; $display("FAIL no effective subtraction"); end
    checks++; if (n_neg == 0)       begin failures++; $display("FAIL no negative sum (complement)"); end
    checks++; if (n_path1 == 0)     begin failures++; $display("FAIL no one-more-shift path"); end
    checks++; if (n_small == 0)     begin failures++; $display("FAIL no small-product case"); end
    checks++; if (n_sticky_a == 0)  begin failures++; $display("FAIL no alignment sticky"); end
    checks++; if (n_clamp == 0)     begin failures++; $display("FAIL no clamped alignment shift"); end
    checks++; if (n_rnd_up == 0)    begin failures++; $display("FAIL no round-up"); end
    checks++; if (n_rnd_carry == 0) begin failures++; $display("FAIL no rounding carry-out"); end
    checks++; if (n_ovf == 0)       begin failures++; $display("FAIL no overflow"); end
    checks++; if (n_unf == 0)       begin failures++; $display("FAIL no underflow"); end
    checks++; if (n_spc == 0)       begin failures++; $display("FAIL no special operand"); end
    checks++; if (n_zero == 0)      begin failures++; $display("FAIL no zero result"); end
    checks++; if (n_pzero == 0)     begin failures++; $display("FAIL no zero product"); end
    checks++; if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results never compared", exp_q.size()); end
    $display("ops=%0d sub=%0d neg=%0d path1=%0d small=%0d sticky_a=%0d clamp=%0d round_up=%0d round_carry=%0d ovf=%0d unf=%0d special=%0d zero=%0d pzero=%0d",
             n_ops, n_sub, n_neg, n_path1, n_small, n_sticky_a, n_clamp, n_rnd_up, n_rnd_carry, n_ovf, n_unf, n_spc, n_zero, n_pzero);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
