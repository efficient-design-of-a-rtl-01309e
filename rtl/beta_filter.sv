// beta(z) branch of the analysis bank: a 13-tap nonlinear-phase SOPOT FIR in
// transposed form, realised as a multiplier block (10 adders) followed by the
// adder/register chain.
//
// It filters the odd polyphase stream xo (format <1|7>) and returns
// beta(z) xo in <3|15>. All beta products are exact at their published word
// lengths, so this branch adds no round-off noise. The register widths come
// from the L1 overflow bound with |xo| <= 1.
//
// Timing: the chain advances on a clock edge with en high; y is
// combinational and belongs to the x presented in the same cycle.
// rst_n (asynchronous, active low) clears the filter state.
module beta_filter
  import sopot_fb_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic signed [X_W-1:0]   x,
  output logic signed [BETA_OW-1:0] y
);

  logic signed [BETA_PW-1:0] p [BETA_TAPS];

  beta_mb u_mb (
    .x (x),
    .p (p)
  );

  transposed_fir #(
    .NTAPS    (BETA_TAPS),
    .PW       (BETA_PW),
    .PF       (BETA_PFRAC),
    .RF       (BETA_RF),
    .OW       (BETA_OW),
    .PWL_FRAC (BETA_PWL_FRAC),
    .REG_INT  (BETA_REG_INT)
  ) u_chain (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (en),
    .p     (p),
    .y     (y)
  );

endmodule
