// Shared constants of the multiplier-less two-channel analysis filter bank.
//
// The bank splits x(n) into its even and odd polyphase streams and forms
//   lowpass   y0 = 0.5 * ( z^-N xe + beta(z) xo )
//   highpass  y1 = z^-M xo - alpha(z) y0
// which gives H0(z) = (z^-2N + z^-1 beta(z^2))/2 and
// H1(z) = -alpha(z^2) H0(z) + z^-(2M+1).
//
// Fixed-point formats are written <i|f>: i integer bits (sign included) and
// f fractional bits, i+f bits in all, two's complement.
//
// The coefficients are the sum-of-powers-of-two values of the published
// 39 dB, system-delay-23 design (N = 3, M = 8): 13 taps for beta, 15 taps for
// alpha, each stored here as an integer in units of 2^-8 (beta) or 2^-9
// (alpha). The per-tap product word lengths (PWL) are the published ones.
// The register integer widths are not copied: they are derived here with the
// L1 (absolute-sum) overflow rule, applied to the partial sums that the
// registers of a transposed-form chain actually hold.
package sopot_fb_pkg;

  // Polyphase delays of the structure.
  localparam int unsigned FB_N = 3;
  localparam int unsigned FB_M = 8;

  // Input x(n): <1|7>.
  localparam int unsigned X_INT  = 1;
  localparam int unsigned X_FRAC = 7;
  localparam int unsigned X_W    = X_INT + X_FRAC;

  // ---------------------------------------------------------------- beta(z)
  localparam int unsigned BETA_TAPS  = 13;
  localparam int unsigned BETA_CFRAC = 8;                 // coefficient LSB 2^-8
  localparam int unsigned BETA_PFRAC = X_FRAC + BETA_CFRAC; // exact product LSB 2^-15
  localparam int unsigned BETA_PW    = 16;                // |x*b| < 1 : <1|15>

  typedef int beta_coef_t [BETA_TAPS];
  typedef int unsigned beta_ui_t [BETA_TAPS];

  // beta(z) = sum_n BETA_COEF[n] * 2^-8 * z^-n
  localparam beta_coef_t BETA_COEF = '{
      10,  // 2^-5 + 2^-7
     -29,  // -2^-3 + 2^-6 - 2^-8
     137,  // 2^-1 + 2^-5 + 2^-8
     188,  // 2^0 - 2^-2 - 2^-6
     -78,  // -2^-2 - 2^-4 + 2^-7
      54,  // 2^-2 - 2^-5 - 2^-7
     -40,  // -2^-3 - 2^-5
      30,  // 2^-3 - 2^-7
     -23,  // -2^-3 + 2^-5 + 2^-8
      16,  // 2^-4
     -11,  // -2^-5 - 2^-6 + 2^-8
       6,  // 2^-5 - 2^-7
      -4   // -2^-6
  };
  // Fractional bits kept after Q{.} for each beta product. Every beta
  // product is exact at these lengths, so beta adds no round-off noise.
  localparam beta_ui_t BETA_PWL_FRAC = '{14, 15, 15, 13, 14, 14, 12, 14, 15, 11, 15, 14, 13};

  // --------------------------------------------------------------- alpha(z)
  localparam int unsigned ALPHA_TAPS  = 15;
  localparam int unsigned ALPHA_CFRAC = 9;                // coefficient LSB 2^-9

  // Lowpass output y0 and alpha input: <2|16>.
  localparam int unsigned Y0_INT  = 2;
  localparam int unsigned Y0_FRAC = 16;
  localparam int unsigned Y0_W    = Y0_INT + Y0_FRAC;

  localparam int unsigned ALPHA_PFRAC = Y0_FRAC + ALPHA_CFRAC; // exact product LSB 2^-25
  localparam int unsigned ALPHA_PW    = 27;               // |y0*a| < 2 * 336/512

  typedef int alpha_coef_t [ALPHA_TAPS];
  typedef int unsigned alpha_ui_t [ALPHA_TAPS];

  // alpha(z) = sum_n ALPHA_COEF[n] * 2^-9 * z^-n
  localparam alpha_coef_t ALPHA_COEF = '{
      -4,  // -2^-7
      12,  // 2^-5 - 2^-7
     -26,  // -2^-4 + 2^-6 - 2^-8
      42,  // 2^-4 + 2^-6 + 2^-8
     -92,  // -2^-2 + 2^-4 + 2^-7
     312,  // 2^-1 + 2^-3 - 2^-6
     336,  // 2^-1 + 2^-3 + 2^-5
    -112,  // -2^-2 + 2^-5
      63,  // 2^-3 - 2^-9
     -40,  // -2^-4 - 2^-6
      25,  // 2^-4 - 2^-6 + 2^-9
     -14,  // -2^-5 + 2^-8
       8,  // 2^-6
      -4,  // -2^-7
       2   // 2^-8
  };
  // Fractional bits kept after Q{.} (round to nearest) for each alpha product.
  localparam alpha_ui_t ALPHA_PWL_FRAC = '{18, 18, 17, 17, 17, 18, 18, 18, 17, 17, 17, 17, 19, 17, 17};

  // Highpass output y1: <4|19>, 23 bits.
  localparam int unsigned Y1_INT  = 4;
  localparam int unsigned Y1_FRAC = 19;
  localparam int unsigned Y1_W    = Y1_INT + Y1_FRAC;

  // ------------------------------------------------------------- functions
  // Smallest number of integer bits i (sign included) for which every value
  // of magnitude at most bound * 2^-frac lies inside [-2^(i-1), 2^(i-1)).
  function automatic int unsigned int_bits_for(input longint bound, input int unsigned frac);
    int unsigned i;
    i = 1;
    while (bound >= (longint'(1) << (i - 1 + frac))) i++;
    return i;
  endfunction

  // Integer bits of the transposed-form register that holds
  //   sum_{k >= first} Q{ c[k] * x }
  // for |x| <= 2^(x_int-1). c is in units 2^-cfrac, x in units 2^-xfrac. The
  // bound is the L1 sum of the coefficients plus half an LSB per rounded tap.
  function automatic int unsigned beta_reg_int(input int unsigned first);
    longint s, c;
    s = 0;
    for (int k = int'(first); k < int'(BETA_TAPS); k++) begin
      c  = longint'(BETA_COEF[k]);
      s += ((c < 0) ? -c : c) << (X_FRAC + X_INT - 1);
    end
    return int_bits_for(s, BETA_PFRAC);
  endfunction

  function automatic int unsigned alpha_reg_int(input int unsigned first);
    longint s, c;
    s = 0;
    for (int k = int'(first); k < int'(ALPHA_TAPS); k++) begin
      c  = longint'(ALPHA_COEF[k]);
      s += ((c < 0) ? -c : c) << (Y0_FRAC + Y0_INT - 1);
      s += longint'(1) << (ALPHA_PFRAC - ALPHA_PWL_FRAC[k] - 1);
    end
    return int_bits_for(s, ALPHA_PFRAC);
  endfunction

  function automatic beta_ui_t beta_reg_int_all();
    beta_ui_t a;
    for (int k = 0; k < int'(BETA_TAPS); k++) a[k] = beta_reg_int(k);
    return a;
  endfunction

  function automatic alpha_ui_t alpha_reg_int_all();
    alpha_ui_t a;
    for (int k = 0; k < int'(ALPHA_TAPS); k++) a[k] = alpha_reg_int(k);
    return a;
  endfunction

  // Derived register formats. beta: <3|15> at its output; alpha: <4|19>.
  localparam beta_ui_t    BETA_REG_INT  = beta_reg_int_all();
  localparam alpha_ui_t   ALPHA_REG_INT = alpha_reg_int_all();
  localparam int unsigned BETA_RF       = 15;   // finest beta tap length
  localparam int unsigned ALPHA_RF      = 19;   // finest alpha tap length
  localparam int unsigned BETA_OW       = BETA_REG_INT[0] + BETA_RF;
  localparam int unsigned ALPHA_OW      = ALPHA_REG_INT[0] + ALPHA_RF;

endpackage
