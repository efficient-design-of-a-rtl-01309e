// Multiplier block (MB) of beta(z): one input sample times all 13 beta
// coefficients, built from shifts and 10 adders/subtractors.
//
// In the transposed form every tap multiplies the same sample, so the
// constant multipliers can share partial results. The coefficients, in units
// of 2^-8, reduce to the odd "fundamentals" 3, 5, 11, 15, 23, 27, 29, 39, 47
// and 137; each fundamental is made with exactly one adder from the input
// and earlier fundamentals:
//   3 = 2+1        5 = 4+1        15 = 16-1      11 = 8+3
//   23 = 3*8-1     27 = 3*8+3     29 = 32-3      39 = 5*8-1
//   47 = 3*16-1    137 = 5*32-23
// and each coefficient is a fundamental shifted left (and negated where the
// coefficient is negative; the negation folds into the following chain
// adder). The adder count of 10 is the published one; the particular graph
// is this design's own, since only the count is given.
//
// Interface: x is <1|7>; p[n] = x * BETA_COEF[n] * 2^-8, exact, in <1|15>.
// Purely combinational.
module beta_mb
  import sopot_fb_pkg::*;
(
  input  logic signed [X_W-1:0]     x,
  output logic signed [BETA_PW-1:0] p [BETA_TAPS]
);

  typedef logic signed [BETA_PW-1:0] w_t;

  w_t f1, f3, f5, f11, f15, f23, f27, f29, f39, f47, f137;

  always_comb begin
    f1   = w_t'(x);
    f3   = (f1 <<< 1) + f1;
    f5   = (f1 <<< 2) + f1;
    f15  = (f1 <<< 4) - f1;
    f11  = (f1 <<< 3) + f3;
    f23  = (f3 <<< 3) - f1;
    f27  = (f3 <<< 3) + f3;
    f29  = (f1 <<< 5) - f3;
    f39  = (f5 <<< 3) - f1;
    f47  = (f3 <<< 4) - f1;
    f137 = (f5 <<< 5) - f23;

    p[0]  =   f5   <<< 1;   //   10
    p[1]  = -(f29);         //  -29
    p[2]  =   f137;         //  137
    p[3]  =   f47  <<< 2;   //  188
    p[4]  = -(f39  <<< 1);  //  -78
    p[5]  =   f27  <<< 1;   //   54
    p[6]  = -(f5   <<< 3);  //  -40
    p[7]  =   f15  <<< 1;   //   30
    p[8]  = -(f23);         //  -23
    p[9]  =   f1   <<< 4;   //   16
    p[10] = -(f11);         //  -11
    p[11] =   f3   <<< 1;   //    6
    p[12] = -(f1   <<< 2);  //   -4
  end

endmodule
