// Adder/register chain of a transposed-form FIR filter with per-tap
// round-off operators Q{.}.
//
// The filter is H(z) = sum_{k=0}^{NTAPS-1} h[k] z^-k. A multiplier block
// delivers all products p[k] = h[k] * x[m] of the current sample at once.
// Each product is first rounded by Q{.} to PWL_FRAC[k] fractional bits (its
// product word length) and then enters the chain
//     r[NTAPS-1] <= Q{p[NTAPS-1]}
//     r[k]       <= Q{p[k]} + r[k+1]      k = NTAPS-2 .. 1
//     y           = Q{p[0]} + r[1]        (combinational)
// so r[k] holds sum_{j>=k} Q{h[j] x[m-j+k]}. The adders themselves never
// round: every register keeps RF fractional bits (the finest tap length), so
// the only round-off noise is the sum of the tap rounding errors.
//
// Register r[k] is REG_INT[k] + RF bits wide; REG_INT[0] sizes the output.
// The caller derives REG_INT from the L1 bound of the partial sum each
// register holds, so nothing can overflow; an assertion checks this in
// simulation. Bits beyond what a partial sum can reach are not stored.
//
// Timing: the registers advance on a clock edge where en is high (one
// sample period of the filter). y belongs to the products presented in the
// same cycle. rst_n is an asynchronous active-low reset that clears the
// chain (the filter state). The transposed structure, Q{.} placement and the
// L1 overflow rule follow the filter-bank design; the enable, the reset and
// exact (non-rounding) chain adders are this design's choices.
module transposed_fir #(
  parameter int unsigned NTAPS = 13,
  parameter int unsigned PW    = 16,
  parameter int unsigned PF    = 15,
  parameter int unsigned RF    = 15,
  parameter int unsigned OW    = 18,
  parameter int unsigned PWL_FRAC [NTAPS] = '{default: 15},
  parameter int unsigned REG_INT  [NTAPS] = '{default: 3}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [PW-1:0] p [NTAPS],
  output logic signed [OW-1:0] y
);

  // Common width of the aligned values inside the chain.
  localparam int unsigned PINT = PW - PF;
  localparam int unsigned CW   = OW + 1;

  logic signed [CW-1:0] q_al [NTAPS];   // rounded products, LSB 2^-RF
  logic signed [CW-1:0] r_ext [NTAPS+1]; // register contents, sign-extended

  assign r_ext[NTAPS] = '0;

  for (genvar k = 0; k < NTAPS; k++) begin : g_tap
    localparam int unsigned QW = PINT + PWL_FRAC[k] + 1;
    logic signed [QW-1:0] q;

    q_round #(.IW(PW), .IF(PF), .OF(PWL_FRAC[k]), .OW(QW)) u_q (
      .din  (p[k]),
      .dout (q)
    );

    assign q_al[k] = CW'(q) <<< (RF - PWL_FRAC[k]);
  end

  for (genvar k = 1; k < NTAPS; k++) begin : g_reg
    localparam int unsigned RW = REG_INT[k] + RF;
    logic signed [CW-1:0] sum;
    logic signed [RW-1:0] r;

    assign sum      = q_al[k] + r_ext[k+1];
    assign r_ext[k] = CW'(r);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r <= '0;
      end else if (en) begin
        r <= RW'(sum);
        assert (CW'(RW'(sum)) == sum)
          else $error("transposed_fir: register %0d overflows its %0d integer bits", k, REG_INT[k]);
      end
    end
  end

  logic signed [CW-1:0] y_full;
  assign y_full = q_al[0] + r_ext[1];
  assign y      = OW'(y_full);

  initial begin
    for (int k = 0; k < int'(NTAPS); k++)
      assert (PWL_FRAC[k] <= RF)
        else $error("transposed_fir: PWL_FRAC[%0d] exceeds RF", k);
  end

endmodule
