// Multiplier block (MB) of alpha(z): one lowpass sample times all 15 alpha
// coefficients, built from shifts and 9 adders/subtractors.
//
// The coefficients, in units of 2^-9, reduce to the odd fundamentals
// 3, 5, 7, 13, 21, 23, 25, 39 and 63, each made with exactly one adder:
//   3 = 2+1      5 = 4+1      7 = 8-1      63 = 64-1    13 = 8+5
//   21 = 16+5    25 = 5*4+5   23 = 16+7    39 = 32+7
// and each coefficient is a fundamental shifted left (negated where the
// coefficient is negative; the negation folds into the following chain
// adder). The adder count of 9 is the published one; the graph is this
// design's own.
//
// Interface: y is the lowpass sample in <2|16>; p[n] = y * ALPHA_COEF[n] *
// 2^-9, exact, with 25 fractional bits (27 bits in all). Purely
// combinational; rounding to the tap word lengths happens in the chain.
module alpha_mb
  import sopot_fb_pkg::*;
(
  input  logic signed [Y0_W-1:0]     y,
  output logic signed [ALPHA_PW-1:0] p [ALPHA_TAPS]
);

  typedef logic signed [ALPHA_PW-1:0] w_t;

  w_t f1, f3, f5, f7, f13, f21, f23, f25, f39, f63;

  always_comb begin
    f1  = w_t'(y);
    f3  = (f1 <<< 1) + f1;
    f5  = (f1 <<< 2) + f1;
    f7  = (f1 <<< 3) - f1;
    f63 = (f1 <<< 6) - f1;
    f13 = (f1 <<< 3) + f5;
    f21 = (f1 <<< 4) + f5;
    f25 = (f5 <<< 2) + f5;
    f23 = (f1 <<< 4) + f7;
    f39 = (f1 <<< 5) + f7;

    p[0]  = -(f1  <<< 2);   //   -4
    p[1]  =   f3  <<< 2;    //   12
    p[2]  = -(f13 <<< 1);   //  -26
    p[3]  =   f21 <<< 1;    //   42
    p[4]  = -(f23 <<< 2);   //  -92
    p[5]  =   f39 <<< 3;    //  312
    p[6]  =   f21 <<< 4;    //  336
    p[7]  = -(f7  <<< 4);   // -112
    p[8]  =   f63;          //   63
    p[9]  = -(f5  <<< 3);   //  -40
    p[10] =   f25;          //   25
    p[11] = -(f7  <<< 1);   //  -14
    p[12] =   f1  <<< 3;    //    8
    p[13] = -(f1  <<< 2);   //   -4
    p[14] =   f1  <<< 1;    //    2
  end

endmodule
