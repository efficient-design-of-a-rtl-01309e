// End-to-end testbench of sopot_analysis_fb at its default (published) size.
//
// An input stream of NS samples is built first: uniform random samples,
// blocks that drive the lowpass and the highpass output to their worst-case
// (L1) values in both directions, a sine and an impulse. It is then fed with
// random gaps in in_valid. Every output pair is checked three ways:
//   1. bit-exact against a reference model of the polyphase equations
//      y0(m) = 0.5 (x(2m-2N) + sum beta[k] x(2m-1-2k))
//      y1(m) = x(2m-1-2M) - sum Q_k{alpha[k] y0(m-k)}
//   2. y0 exactly equal to the full-rate lowpass filter
//      H0(z) = (z^-2N + z^-1 beta(z^2))/2 applied to x and decimated,
//      y1 close to the full-rate highpass H1(z) = -alpha(z^2) H0(z) +
//      z^-(2M+1): the mean square error (the round-off noise) must stay
//      below -96 dB, the 16-bit accuracy target;
//   3. out_valid exactly 3 clock edges after the edge that accepted x(2m).
// The run counts the mechanisms of the design and fails if one never
// occurred: input gaps, back-to-back samples, decimation (one pair per two
// samples), rounding in the alpha taps, a lowpass output that needs its
// second integer bit and a highpass output that needs its third.
module tb_sopot_analysis_fb;
  `include "fb_ref.svh"

  localparam int NS = 6000;        // input samples
  localparam int H0L = 2 * TB_NB + 2 * TB_N;
  localparam int H1L = 2 * TB_NA + H0L + 2 * TB_M + 2;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n, in_valid;
  logic signed [7:0] x;
  logic              out_valid;
  logic signed [17:0] y0;
  logic signed [22:0] y1;

  sopot_analysis_fb dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .out_valid(out_valid), .y0(y0), .y1(y1)
  );

  longint xs [NS];
  longint y0_ref [$];            // reference lowpass, units 2^-16
  real    h0 [H0L];
  real    h1 [H1L];
  int     accept_cycle [$];      // cycle of each accepted even sample
  int     cycle = 0;
  int     m_out = 0;

  // mechanism counters
  int n_gap = 0, n_b2b = 0, n_pairs = 0, n_round = 0, n_y0big = 0, n_y1big = 0;
  real err_pow = 0.0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s (pair %0d)", what, m_out);
    end
  endtask

  function automatic longint xat(input int n);
    return (n < 0 || n >= NS) ? 0 : xs[n];
  endfunction

  function automatic longint worst(input real c, input bit pos);
    if (pos) return (c >= 0.0) ? 127 : -128;
    return (c >= 0.0) ? -128 : 127;
  endfunction

  // ------------------------------------------------------------ stimulus
  initial begin
    for (int i = 0; i < H0L; i++) h0[i] = 0.0;
    for (int i = 0; i < H1L; i++) h1[i] = 0.0;
    h0[2 * TB_N] += 0.5;
    for (int k = 0; k < TB_NB; k++) h0[2 * k + 1] += 0.5 * real'(tb_beta_c16(k)) / 65536.0;
    for (int k = 0; k < TB_NA; k++)
      for (int i = 0; i < H0L; i++)
        h1[2 * k + i] -= real'(tb_alpha_c16(k)) / 65536.0 * h0[i];
    h1[2 * TB_M + 1] += 1.0;

    for (int n = 0; n < NS; n++) xs[n] = longint'($urandom_range(0, 255)) - 128;
    // worst-case blocks ending at even sample indices
    for (int i = 0; i < H0L; i++) begin
      xs[1200 - i] = worst(h0[i], 1'b1);
      xs[1400 - i] = worst(h0[i], 1'b0);
    end
    for (int i = 0; i < H1L; i++) begin
      xs[1800 - i] = worst(h1[i], 1'b1);
      xs[2000 - i] = worst(h1[i], 1'b0);
    end
    for (int n = 2400; n < 3400; n++) xs[n] = longint'($rtoi(100.0 * $sin(0.37 * n)));
    for (int n = 3400; n < 3600; n++) xs[n] = (n == 3450) ? 127 : 0;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NS; ) begin
      in_valid = ($urandom_range(0, 4) != 0);
      x = in_valid ? 8'(xs[n]) : 8'($urandom);
      @(posedge clk);
      if (in_valid) begin
        if (n % 2 == 0) accept_cycle.push_back(cycle);
        n++;
      end
      #1;
    end
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    #1;
    check("all pairs seen", m_out == NS / 2);
    check("gaps occurred", n_gap > 0);
    check("back-to-back samples occurred", n_b2b > 0);
    check("one pair per two samples", n_pairs == NS / 2);
    check("alpha rounding occurred", n_round > 0);
    check("lowpass used its 2nd integer bit", n_y0big > 0);
    check("highpass used its 3rd integer bit", n_y1big > 0);
    err_pow = err_pow / real'(m_out);
    $display("pairs %0d, gaps %0d, back-to-back %0d, rounded %0d, |y0|>=1 %0d, |y1|>=2 %0d",
             n_pairs, n_gap, n_b2b, n_round, n_y0big, n_y1big);
    $display("highpass round-off noise power %0.2f dB", 10.0 * $log10(err_pow));
    check("noise power below -96 dB", 10.0 * $log10(err_pow) < -96.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------- monitor
  logic in_valid_d = 1'b0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      if (!in_valid) n_gap++;
      if (in_valid && in_valid_d) n_b2b++;
      in_valid_d <= in_valid;
    end
  end

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      longint s, y0e, y1e, exact1, xo_m;
      real    i0, i1, e;
      int     m, acc;
      m = m_out;
      n_pairs++;
      // 1. polyphase reference
      s = xat(2 * m - 2 * TB_N) <<< 16;
      for (int k = 0; k < TB_NB; k++) s += tb_beta_c16(k) * xat(2 * m - 1 - 2 * k);
      y0e = s >>> 8;
      y0_ref.push_back(y0e);
      xo_m = xat(2 * m - 1 - 2 * TB_M);
      y1e = xo_m <<< 12;
      exact1 = xo_m <<< 25;
      for (int k = 0; k < TB_NA; k++) begin
        longint yk, pr;
        yk = (m - k >= 0) ? y0_ref[m - k] : 0;
        pr = yk * tb_alpha_c16(k);
        y1e -= tb_round(pr, 32, TB_ALPHA_PWL[k]) <<< (19 - TB_ALPHA_PWL[k]);
        exact1 -= pr;
      end
      check("y0 bit-exact", longint'(y0) == y0e);
      check("y1 bit-exact", longint'(y1) == y1e);
      if ((longint'(y1) <<< 13) != exact1) n_round++;
      if (y0e >= 65536 || y0e < -65536) n_y0big++;
      if (y1e >= (longint'(2) << 19) || y1e < -(longint'(2) << 19)) n_y1big++;
      // 2. full-rate filters
      i0 = 0.0; i1 = 0.0;
      for (int i = 0; i < H0L; i++) i0 += h0[i] * real'(xat(2 * m - i)) / 128.0;
      for (int i = 0; i < H1L; i++) i1 += h1[i] * real'(xat(2 * m - i)) / 128.0;
      e = real'(y0) / 65536.0 - i0;
      check("y0 equals full-rate H0 output", e < 1.0e-9 && e > -1.0e-9);
      e = real'(y1) / 524288.0 - i1;
      err_pow += e * e;
      // 3. latency
      acc = accept_cycle.pop_front();
      check("latency 3 cycles", cycle - acc == 3);
      m_out++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
