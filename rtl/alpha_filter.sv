// alpha(z) branch of the analysis bank: a 15-tap nonlinear-phase SOPOT FIR
// in transposed form, realised as a multiplier block (9 adders) followed by
// the adder/register chain with round-to-nearest Q{.} on every tap.
//
// It filters the lowpass output y0 (format <2|16>) and returns alpha(z) y0 in
// <4|19> (23 bits). Each product is rounded to its published word length
// (17, 18 or 19 fractional bits); the chain adds the rounded products exactly.
// Register widths come from the L1 overflow bound with |y0| < 2.
//
// Timing: the chain advances on a clock edge with en high; y is
// combinational and belongs to the sample presented in the same cycle.
// rst_n (asynchronous, active low) clears the filter state.
module alpha_filter
  import sopot_fb_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     en,
  input  logic signed [Y0_W-1:0]   x,
  output logic signed [ALPHA_OW-1:0] y
);

  logic signed [ALPHA_PW-1:0] p [ALPHA_TAPS];

  alpha_mb u_mb (
    .y (x),
    .p (p)
  );

  transposed_fir #(
    .NTAPS    (ALPHA_TAPS),
    .PW       (ALPHA_PW),
    .PF       (ALPHA_PFRAC),
    .RF       (ALPHA_RF),
    .OW       (ALPHA_OW),
    .PWL_FRAC (ALPHA_PWL_FRAC),
    .REG_INT  (ALPHA_REG_INT)
  ) u_chain (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .p     (p),
    .y     (y)
  );

endmodule
