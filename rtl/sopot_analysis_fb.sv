// Multiplier-less two-channel perfect-reconstruction analysis filter bank
// (top level).
//
// The input x(n) (<1|7>) is split into polyphase streams xe(m) = x(2m) and
// xo(m) = x(2m-1). Per output sample m the bank computes
//   y0(m) = 0.5 * ( xe(m-N) + [beta(z) xo](m) )      lowpass,  <2|16>
//   y1(m) = xo(m-M) - [alpha(z) y0](m)                highpass, <4|19>
// i.e. H0(z) = (z^-2N + z^-1 beta(z^2))/2 and H1(z) = -alpha(z^2) H0(z) +
// z^-(2M+1), with N = 3 and M = 8. beta and alpha are SOPOT FIR filters in
// transposed form, each fed by a multiplier block (10 and 9 adders). The
// lowpass path is exact; the only round-off is in the alpha taps, whose word
// lengths keep the highpass noise below the 16-bit (-96 dB) target. No
// signal can overflow: every register is sized by the L1 bound.
//
// Interface: one input sample per clock at most, with in_valid (gaps are
// allowed). The first sample after reset is x(0). For every two input
// samples one output pair (y0, y1) appears with out_valid high for one
// cycle.
//
// Timing: three pipeline registers. The pair is formed on the edge that
// accepts x(2m); the beta branch and the lowpass adder settle in the next
// cycle and y0 is registered; the alpha branch and the highpass subtraction
// settle in the cycle after and both outputs are registered. So out_valid
// rises 3 clock edges after the edge that accepted x(2m). The polyphase
// filter states advance only on their sample's strobe, so the pipeline does
// not change the transfer functions. rst_n is asynchronous, active low, and
// clears all state (samples before x(0) count as zero).
//
// The structure, coefficients, delays N and M, input, lowpass-to-alpha and
// output formats follow the published design; the pipelining, handshake and
// reset are this design's choices.
module sopot_analysis_fb
  import sopot_fb_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [X_W-1:0] x,
  output logic                  out_valid,
  output logic signed [Y0_W-1:0] y0,
  output logic signed [Y1_W-1:0] y1
);

  // ---------------------------------------------------- polyphase split
  logic                  s0;
  logic signed [X_W-1:0] xe, xo;

  polyphase_split #(.W(X_W)) u_split (
    .clk        (clk),
    .rst_n      (rst_n),
    .in_valid   (in_valid),
    .x          (x),
    .pair_valid (s0),
    .xe         (xe),
    .xo         (xo)
  );

  // ------------------------------------------ upper branch and beta(z)
  logic signed [X_W-1:0]     xe_dn, xo_dm;
  logic signed [BETA_OW-1:0] yb;

  delay_line #(.W(X_W), .D(FB_N)) u_zn (
    .clk (clk), .rst_n (rst_n), .en (s0), .din (xe), .dout (xe_dn)
  );

  delay_line #(.W(X_W), .D(FB_M)) u_zm (
    .clk (clk), .rst_n (rst_n), .en (s0), .din (xo), .dout (xo_dm)
  );

  beta_filter u_beta (
    .clk (clk), .rst_n (rst_n), .en (s0), .x (xo), .y (yb)
  );

  // Lowpass adder at LSB 2^-15, then the 0.5 scaling: the same integer read
  // with LSB 2^-16. |xe + beta xo| <= 1 + 2.445 < 4, so <2|16> holds it.
  localparam int unsigned LW = BETA_OW + 1;
  logic signed [LW-1:0] low_sum;

  assign low_sum = (LW'(xe_dn) <<< (BETA_RF - X_FRAC)) + LW'(yb);

  logic                   s1;
  logic signed [Y0_W-1:0] y0_q;
  logic signed [X_W-1:0]  xo_dm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1      <= 1'b0;
      y0_q    <= '0;
      xo_dm_q <= '0;
    end else begin
      s1 <= s0;
      if (s0) begin
        y0_q    <= Y0_W'(low_sum);
        xo_dm_q <= xo_dm;
        assert (LW'(Y0_W'(low_sum)) == low_sum)
          else $error("sopot_analysis_fb: lowpass output overflows <2|16>");
      end
    end
  end

  // -------------------------------------- lower branch and alpha(z)
  logic signed [ALPHA_OW-1:0] ya;

  alpha_filter u_alpha (
    .clk (clk), .rst_n (rst_n), .en (s1), .x (y0_q), .y (ya)
  );

  localparam int unsigned HW = ALPHA_OW + 1;
  logic signed [HW-1:0] high_diff;

  assign high_diff = (HW'(xo_dm_q) <<< (ALPHA_RF - X_FRAC)) - HW'(ya);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y0        <= '0;
      y1        <= '0;
    end else begin
      out_valid <= s1;
      if (s1) begin
        y0 <= y0_q;
        y1 <= Y1_W'(high_diff);
        assert (HW'(Y1_W'(high_diff)) == high_diff)
          else $error("sopot_analysis_fb: highpass output overflows <4|19>");
      end
    end
  end

  // Pacing rule of the interface: a pair needs two input samples, so neither
  // the pair strobe nor out_valid can be high in two consecutive cycles.
  a_pair_pacing : assert property (@(posedge clk) disable iff (!rst_n) s0 |=> !s0)
    else $error("sopot_analysis_fb: two pairs in consecutive cycles");
  a_out_pacing : assert property (@(posedge clk) disable iff (!rst_n) out_valid |=> !out_valid)
    else $error("sopot_analysis_fb: out_valid high in consecutive cycles");

endmodule
