// fma_pkg: widths, constants and stage-boundary types shared by the
// single-precision fused multiply-add datapath.
//
// The datapath keeps the addend significand in a 74-bit alignment field
// (24 addend bits, 2 guard positions, 48 product bits) and sums it with the
// product in a 75-bit adder (the extra MSB carries the sign of the
// two's-complement sum). Bit 46 of the field has the weight of the product's
// exponent; the unshifted addend sits 27 positions above it. These numbers
// follow the published conventional FMA organisation. Exponents inside the
// datapath are carried as signed, biased, 11-bit values so that intermediate
// overflow and underflow can be detected before packing.
package fma_pkg;

  localparam int unsigned EXP_W   = 8;
  localparam int unsigned FRAC_W  = 23;
  localparam int unsigned SIG_W   = FRAC_W + 1;        // 24, hidden one included
  localparam int unsigned PROD_W  = 2 * SIG_W;         // 48
  localparam int unsigned ALIGN_W = SIG_W + 2 + PROD_W; // 74
  localparam int unsigned ADD_W   = ALIGN_W + 1;       // 75
  localparam int unsigned HI_W    = ALIGN_W - PROD_W;  // 26 addend MSBs outside the CSA
  localparam int unsigned SHAMT_W = 7;                 // 0..74
  localparam int unsigned EI_W    = 11;                // internal signed exponent
  localparam int          BIAS    = 127;
  localparam int          ALIGN_BASE = 27;             // shift = 27 - d
  localparam int          LZD_N   = 128;               // LZD width, next power of two above ADD_W
  localparam int unsigned CNT_W   = $clog2(LZD_N);     // 7

  typedef logic signed [EI_W-1:0] exp_int_t;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  // Operand class, decided from the exponent field. Subnormal encodings are
  // read as zero.
  typedef enum logic [1:0] {CLS_ZERO, CLS_NORMAL, CLS_INF, CLS_NAN} fp_class_e;

  // Result override computed in stage 1 for special operands.
  typedef enum logic [1:0] {SPC_NONE, SPC_INF, SPC_NAN} special_e;

  localparam fp32_t QNAN = '{sign: 1'b0, exp: '1, frac: 23'h400000};

  function automatic fp_class_e classify(fp32_t x);
    if (x.exp == '0)      return CLS_ZERO;
    else if (x.exp != '1) return CLS_NORMAL;
    else if (x.frac == '0) return CLS_INF;
    else                  return CLS_NAN;
  endfunction

  // Stage 1 -> stage 2 register contents.
  typedef struct packed {
    logic [HI_W:0]    add_hi;   // aligned addend bits 73..48 plus sign bit 74
    logic [PROD_W-1:0] csa_sum;
    logic [PROD_W-1:0] csa_carry; // weight 2
    logic             cin;       // +1 completing the two's complement of the addend
    logic             sticky_a;  // addend bits shifted out of the field
    exp_int_t         exp_ref;   // biased exponent of field bit 46
    logic             sign_p;    // sign of the product
    logic             sub;       // effective subtraction
    logic             zero_sign; // sign of an exact zero sum
    special_e         special;
    logic             special_sign;
  } stage1_t;

  // Stage 2 -> stage 3 register contents.
  typedef struct packed {
    logic [ADD_W-1:0] mag;       // magnitude of the sum (after the complementer)
    logic [CNT_W-1:0] lz_cnt;    // LZD count selected by the sign of sum
    logic             sticky_a;
    exp_int_t         exp_ref;
    logic             sign;      // sign of a nonzero, non-special result
    logic             zero_sign;
    special_e         special;
    logic             special_sign;
  } stage2_t;

endpackage
