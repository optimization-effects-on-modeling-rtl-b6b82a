// fma_top: pipelined IEEE-754 single-precision fused multiply-add,
//   result = a + b * c,
// with a single rounding (round to nearest, ties to even).
//
// Stage 1 (multiply and align). The significands of b and c go into a
// 24x24 AND-array multiplier reduced by a 4:2 compressor tree, which leaves
// the product in carry-save form (48-bit sum and carry). The sign logic
// forms the product sign and the effective-subtraction flag. In parallel the
// exponent logic computes the alignment shift 27 - d, d = exp_a - exp_bc,
// and the addend significand is inverted (for an effective subtraction) and
// right-shifted in a 74-bit field: addend at the top, two guard positions,
// then the 48 product positions. A 48-bit 3:2 row adds the field's 48 LSBs
// to the product's sum and carry; the 26 upper field bits bypass it.
// Stage 2 (add and anticipate). A 75-bit carry-propagate adder forms the
// two's-complement sum. From the same operands a leading-zero anticipator
// builds a positive and a negative leading-digit string, two leading-zero
// detectors encode them, and the sign of the sum selects one count. The
// adder is a compound one (x + y and x + y + 1): a negative result is passed
// on as x + y, so that its bitwise inverse is already its magnitude; the
// complementer inverts it and the sign logic forms the result's sign before
// the stage register.
// Stage 3 (normalize, round). Two normalize-and-round paths (count, count + 1) run side by side and a
// 2:1 multiplexer keeps the one whose leading one landed in the MSB. The
// result is packed with the sign, overflow and special cases.
//
// Interface: one operation per clock, no handshake. a, b, c are sampled on
// a rising edge of clk and the result appears after the third rising edge
// (latency 3, throughput 1). There is no reset: the pipeline holds only
// data.
//
// Follows the published design: the three phases and their blocks, the
// 74-bit field and 27 - d shift, the 48-bit 3:2 row, the 75-bit adder,
// the LZA and LZD equations, the 2:1 count selection by the sum's sign and
// the duplicated normalize-and-round paths. This design's own choices: the
// placement of the pipeline registers at the three stage boundaries; the
// alignment sticky bit; the compound adder that lets the complementer be
// pure inverters; the forced last position of the LZA strings; subnormal
// inputs read as zero and results below the normal range flushed to a
// signed zero; exponent overflow giving infinity; NaN and infinity inputs
// handled as IEEE-754 specifies, with a default quiet NaN.
module fma_top
  import fma_pkg::*;
(
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  output logic [31:0] result
);
  // ------------------------------------------------------------ stage 1
  fp32_t      fa, fb, fc;
  fp_class_e  cls_a, cls_b, cls_c;
  logic       a_zero, p_zero, sign_p, sub;
  logic [SIG_W-1:0] sig_a, sig_b, sig_c;

  assign fa = fp32_t'(a);
  assign fb = fp32_t'(b);
  assign fc = fp32_t'(c);

  always_comb begin
    cls_a  = classify(fa);
    cls_b  = classify(fb);
    cls_c  = classify(fc);
    a_zero = (cls_a == CLS_ZERO);
    p_zero = (cls_b == CLS_ZERO) || (cls_c == CLS_ZERO);
    // hidden one made explicit; a zero (or subnormal) operand gives 0
    sig_a  = (cls_a == CLS_ZERO) ? '0 : {1'b1, fa.frac};
    sig_b  = (cls_b == CLS_ZERO) ? '0 : {1'b1, fb.frac};
    sig_c  = (cls_c == CLS_ZERO) ? '0 : {1'b1, fc.frac};
  end

  logic zero_sign1;
  sign_logic u_sign (.sign_a(fa.sign), .sign_b(fb.sign), .sign_c(fc.sign),
                     .sign_p(sign_p), .sub(sub), .zero_sign(zero_sign1));

  logic [PROD_W-1:0] m_sum, m_carry, p_sum, p_carry;
  array_multiplier #(.N(SIG_W)) u_mult (.x(sig_b), .y(sig_c), .sum(m_sum), .carry(m_carry));

  logic [SHAMT_W-1:0] shamt;
  logic               prod_small;
  exp_int_t           exp_ref1;
  align_shift_calc u_shcalc (
    .exp_a(fa.exp), .exp_b(fb.exp), .exp_c(fc.exp),
    .a_zero(a_zero), .p_zero(p_zero),
    .shamt(shamt), .prod_small(prod_small), .exp_ref(exp_ref1)
  );

  logic [ALIGN_W-1:0] aligned;
  logic               sticky_a;
  align_shifter #(.W(ALIGN_W)) u_align (
    .sig(sig_a), .inv(sub), .shamt(shamt), .aligned(aligned), .sticky(sticky_a)
  );

  // A product far below the addend only contributes a sticky 1 at the LSB.
  always_comb begin
    if (prod_small) begin
      p_sum   = PROD_W'(1);
      p_carry = '0;
    end else begin
      p_sum   = m_sum;
      p_carry = m_carry;
    end
  end

  logic [PROD_W-1:0] csa_s, csa_c;
  csa32 #(.W(PROD_W)) u_csa (.x(p_sum), .y(p_carry), .z(aligned[PROD_W-1:0]),
                             .sum(csa_s), .carry(csa_c));

  // Special operands (NaN, infinity) bypass the datapath.
  special_e spc1;
  logic     spc_sign1;
  always_comb begin
    logic p_inf, p_nan;
    p_nan = (cls_b == CLS_NAN) || (cls_c == CLS_NAN) ||
            (cls_b == CLS_INF && cls_c == CLS_ZERO) || (cls_c == CLS_INF && cls_b == CLS_ZERO);
    p_inf = !p_nan && (cls_b == CLS_INF || cls_c == CLS_INF);
    spc1      = SPC_NONE;
    spc_sign1 = 1'b0;
    if (p_nan || cls_a == CLS_NAN || (p_inf && cls_a == CLS_INF && sub)) begin
      spc1 = SPC_NAN;
    end else if (p_inf) begin
      spc1      = SPC_INF;
      spc_sign1 = sign_p;
    end else if (cls_a == CLS_INF) begin
      spc1      = SPC_INF;
      spc_sign1 = fa.sign;
    end
  end

  stage1_t s1_d, s1_q;
  always_comb begin
    s1_d.add_hi       = {sub, aligned[ALIGN_W-1:PROD_W]};
    s1_d.csa_sum      = csa_s;
    s1_d.csa_carry    = csa_c;
    s1_d.cin          = sub & ~sticky_a;
    s1_d.sticky_a     = sticky_a;
    s1_d.exp_ref      = exp_ref1;
    s1_d.sign_p       = sign_p;
    s1_d.sub          = sub;
    s1_d.zero_sign    = zero_sign1;
    s1_d.special      = spc1;
    s1_d.special_sign = spc_sign1;
  end

  always_ff @(posedge clk) s1_q <= s1_d;

  // ------------------------------------------------------------ stage 2
  logic [ADD_W-1:0] add_x, add_y, sum0, sum1, sum2, pre_mag, mag2;
  logic             neg2;
  assign add_x = {s1_q.add_hi, s1_q.csa_sum};
  assign add_y = {{(ADD_W-PROD_W-1){1'b0}}, s1_q.csa_carry, 1'b0};

  cpa #(.W(ADD_W)) u_add (.x(add_x), .y(add_y), .sum(sum0), .sum_inc(sum1));

  // sign logic: the true sum includes the carry-in; a negative sum is handed
  // to the complementer as x + y, whose inverse is its magnitude
  always_comb begin
    sum2    = s1_q.cin ? sum1 : sum0;
    neg2    = sum2[ADD_W-1];
    pre_mag = neg2 ? sum0 : sum2;
  end

  logic [0:ADD_W-1] lza_pos, lza_neg;
  lza #(.W(ADD_W)) u_lza (.x(add_x), .y(add_y), .pos(lza_pos), .neg(lza_neg));

  logic [CNT_W-1:0] cnt_pos, cnt_neg;
  logic             v_pos, v_neg;
  lzd #(.N(LZD_N)) u_lzd_pos (.b({lza_pos, {(LZD_N-ADD_W){1'b0}}}), .pos(cnt_pos), .valid(v_pos));
  lzd #(.N(LZD_N)) u_lzd_neg (.b({lza_neg, {(LZD_N-ADD_W){1'b0}}}), .pos(cnt_neg), .valid(v_neg));

  complementer #(.W(ADD_W)) u_compl (.x(pre_mag), .neg(neg2), .mag(mag2));

  stage2_t s2_d, s2_q;
  always_comb begin
    s2_d.mag          = mag2;
    s2_d.sign         = s1_q.sign_p ^ neg2;
    // 2:1 selection of the count by the sign of the completed sum
    s2_d.lz_cnt       = neg2 ? cnt_neg : cnt_pos;
    s2_d.sticky_a     = s1_q.sticky_a;
    s2_d.exp_ref      = s1_q.exp_ref;
    s2_d.zero_sign    = s1_q.zero_sign;
    s2_d.special      = s1_q.special;
    s2_d.special_sign = s1_q.special_sign;
  end

  always_ff @(posedge clk) s2_q <= s2_d;

  // valid flags are implied by a nonzero magnitude, sub by the sum's sign
  logic unused2;
  assign unused2 = v_pos ^ v_neg ^ s1_q.sub;

  // ------------------------------------------------------------ stage 3
  logic [SIG_W-1:0] sig3;
  exp_int_t         exp3;
  norm_round_dual u_nr (.mag(s2_q.mag), .cnt(s2_q.lz_cnt), .sticky_a(s2_q.sticky_a),
                        .exp_ref(s2_q.exp_ref), .sig(sig3), .exp_out(exp3));

  // sig3[23] is the hidden one, not stored in the packed result
  logic unused_hidden;
  assign unused_hidden = sig3[SIG_W-1];

  fp32_t res_d;
  always_comb begin
    if (s2_q.special == SPC_NAN) begin
      res_d = QNAN;
    end else if (s2_q.special == SPC_INF) begin
      res_d = '{sign: s2_q.special_sign, exp: '1, frac: '0};
    end else if (s2_q.mag == '0) begin
      res_d = '{sign: s2_q.zero_sign, exp: '0, frac: '0};
    end else if (exp3 >= exp_int_t'(255)) begin
      res_d = '{sign: s2_q.sign, exp: '1, frac: '0};
    end else if (exp3 <= exp_int_t'(0)) begin
      res_d = '{sign: s2_q.sign, exp: '0, frac: '0};
    end else begin
      res_d = '{sign: s2_q.sign, exp: exp3[EXP_W-1:0], frac: sig3[FRAC_W-1:0]};
    end
  end

  always_ff @(posedge clk) result <= 32'(res_d);

endmodule
