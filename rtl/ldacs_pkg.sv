// ldacs_pkg: types, constants and small functions shared by the LDACS
// physical-layer coding chain.
//
// Contents:
//   * code_rate_e / mod_e - run-time selection of the convolutional code rate
//     (1/2, 2/3, 3/4) and of the modulation (QPSK, 16-QAM, 64-QAM). The
//     document names QPSK-1/2 and 64-QAM-3/4 as coding and modulation schemes;
//     16-QAM and rate 2/3 complete the usual set and are this design's choice.
//   * The K=7 convolutional code (generators 171/133 octal) and its puncturing
//     patterns. The document only says the inner code is a "variable-rate
//     convolutional code"; the generators and patterns are the common
//     industry choice and an assumption of this design.
//   * GF(2^8) arithmetic (field polynomial x^8+x^4+x^3+x^2+1) and the
//     Reed-Solomon generator polynomial with roots alpha^0 .. alpha^(2T-1),
//     computed by constant functions so no table is stored in a file.
//   * Soft-value conventions: a soft bit is a signed SOFT_W-bit number in
//     [-SOFT_MAX, SOFT_MAX]; positive means "bit is 1", 0 is an erasure.
package ldacs_pkg;

  typedef enum logic [1:0] {
    RATE_1_2 = 2'd0,
    RATE_2_3 = 2'd1,
    RATE_3_4 = 2'd2
  } code_rate_e;

  typedef enum logic [1:0] {
    MOD_QPSK  = 2'd0,
    MOD_16QAM = 2'd1,
    MOD_64QAM = 2'd2
  } mod_e;

  // Convolutional code: constraint length 7, 64 states, rate 1/2 mother code.
  localparam int unsigned CC_K      = 7;
  localparam int unsigned CC_M      = CC_K - 1;          // memory = tail bits
  localparam int unsigned CC_STATES = 1 << CC_M;
  localparam logic [6:0]  CC_G1     = 7'o171;
  localparam logic [6:0]  CC_G2     = 7'o133;

  // Soft values.
  localparam int unsigned SOFT_W   = 4;
  localparam int          SOFT_MAX = 7;
  typedef logic signed [SOFT_W-1:0] soft_t;

  typedef logic [7:0] gf_t;

  // Encoder outputs for one trellis branch. window = {u_k, u_(k-1) .. u_(k-6)}.
  function automatic logic [1:0] cc_out(input logic [6:0] window);
    return {^(window & CC_G1), ^(window & CC_G2)};
  endfunction

  // Puncturing period (in trellis steps) for each rate.
  function automatic logic [1:0] punct_period(input code_rate_e r);
    case (r)
      RATE_2_3: return 2'd2;
      RATE_3_4: return 2'd3;
      default:  return 2'd1;
    endcase
  endfunction

  // Which of the two coded bits {X, Y} are sent at a phase of the period.
  //   2/3: X = 10, Y = 11  ->  X1 Y1 Y2
  //   3/4: X = 101, Y = 110 -> X1 Y1 Y2 X3
  function automatic logic [1:0] punct_keep(input code_rate_e r, input logic [1:0] phase);
    case (r)
      RATE_2_3: return (phase == 2'd0) ? 2'b11 : 2'b01;
      RATE_3_4: case (phase)
                  2'd0:    return 2'b11;
                  2'd1:    return 2'b01;
                  default: return 2'b10;
                endcase
      default:  return 2'b11;
    endcase
  endfunction

  // Number of coded bits per modulation symbol.
  function automatic logic [2:0] bits_per_symbol(input mod_e m);
    case (m)
      MOD_16QAM: return 3'd4;
      MOD_64QAM: return 3'd6;
      default:   return 3'd2;
    endcase
  endfunction

  // GF(2^8) multiply, field polynomial 0x11D.
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    gf_t p, aa;
    p  = '0;
    aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ aa;
      aa = aa[7] ? ((aa << 1) ^ 8'h1D) : (aa << 1);
    end
    return p;
  endfunction

  // alpha^n.
  function automatic gf_t gf_pow_alpha(input int unsigned n);
    gf_t x;
    x = 8'h01;
    for (int unsigned i = 0; i < n; i++) x = gf_mul(x, 8'h02);
    return x;
  endfunction

  // Multiplicative inverse, a^254 = a^2 * a^4 * ... * a^128 (0 maps to 0).
  function automatic gf_t gf_inv(input gf_t a);
    gf_t sq, r;
    sq = a;
    r  = 8'h01;
    for (int k = 1; k < 8; k++) begin
      sq = gf_mul(sq, sq);
      r  = gf_mul(r, sq);
    end
    return r;
  endfunction

  // Coefficient i (of x^i) of g(x) = prod_{j=0}^{nroots-1} (x + alpha^j),
  // monic of degree nroots. Used at elaboration time only.
  function automatic gf_t rs_gen_coef(input int unsigned nroots, input int unsigned i);
    gf_t g [0:64];
    for (int k = 0; k <= 64; k++) g[k] = '0;
    g[0] = 8'h01;
    for (int unsigned j = 0; j < nroots; j++) begin
      gf_t r;
      r = gf_pow_alpha(j);
      // multiply g by (x + r): new g[k] = g[k-1] + r*g[k]
      for (int k = 64; k >= 1; k--) g[k] = g[k-1] ^ gf_mul(g[k], r);
      g[0] = gf_mul(g[0], r);
    end
    return g[i];
  endfunction

  // Saturate a signed integer to a soft value.
  function automatic soft_t soft_sat(input int v);
    if (v > SOFT_MAX)  return soft_t'(SOFT_MAX);
    if (v < -SOFT_MAX) return soft_t'(-SOFT_MAX);
    return soft_t'(v);
  endfunction

endpackage
