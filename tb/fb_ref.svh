// Reference data for the filter-bank testbenches, written independently of
// the RTL: every coefficient is given as its list of signed power-of-two
// terms, exactly as the SOPOT design lists them. A term code +/-(e+1) stands
// for +/-2^-e; 0 means "no term". Included inside a testbench module.

localparam int TB_NB = 13;
localparam int TB_NA = 15;
localparam int TB_N  = 3;
localparam int TB_M  = 8;

localparam int TB_BETA_TERMS [TB_NB][3] = '{
  '{ 6,  8,  0}, '{-4,  7, -9}, '{ 2,  6,  9}, '{ 1, -3, -7}, '{-3, -5,  8},
  '{ 3, -6, -8}, '{-4, -6,  0}, '{ 4, -8,  0}, '{-4,  6,  9}, '{ 5,  0,  0},
  '{-6, -7,  9}, '{ 6, -8,  0}, '{-7,  0,  0}
};

localparam int TB_ALPHA_TERMS [TB_NA][3] = '{
  '{-8,  0,  0}, '{ 6, -8,  0}, '{-5,  7, -9}, '{ 5,  7,  9}, '{-3,  5,  8},
  '{ 2,  4, -7}, '{ 2,  4,  6}, '{-3,  6,  0}, '{ 4,-10,  0}, '{-5, -7,  0},
  '{ 5, -7, 10}, '{-6,  9,  0}, '{ 7,  0,  0}, '{-8,  0,  0}, '{ 9,  0,  0}
};

// Fractional bits each alpha product keeps after rounding.
localparam int TB_ALPHA_PWL [TB_NA] = '{18, 18, 17, 17, 17, 18, 18, 18, 17, 17, 17, 17, 19, 17, 17};

// Coefficient value in units of 2^-16.
function automatic longint tb_terms_value(input int t0, input int t1, input int t2);
  longint v;
  int t [3];
  t = '{t0, t1, t2};
  v = 0;
  foreach (t[i]) begin
    if (t[i] > 0) v += longint'(1) << (16 - (t[i] - 1));
    if (t[i] < 0) v -= longint'(1) << (16 - (-t[i] - 1));
  end
  return v;
endfunction

function automatic longint tb_beta_c16(input int n);
  return tb_terms_value(TB_BETA_TERMS[n][0], TB_BETA_TERMS[n][1], TB_BETA_TERMS[n][2]);
endfunction

function automatic longint tb_alpha_c16(input int n);
  return tb_terms_value(TB_ALPHA_TERMS[n][0], TB_ALPHA_TERMS[n][1], TB_ALPHA_TERMS[n][2]);
endfunction

// Round v * 2^-inf to the nearest multiple of 2^-outf (ties up); the result
// is in units of 2^-outf.
function automatic longint tb_round(input longint v, input int inf, input int outf);
  real r;
  r = real'(v) * (2.0 ** (outf - inf));
  return longint'($floor(r + 0.5));
endfunction
