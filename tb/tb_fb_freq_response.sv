// Workload testbench: frequency responses of the analysis bank, measured on
// the hardware.
//
// Two impulses of amplitude 127/128 are fed to sopot_analysis_fb, one at an
// even and one at an odd sample index, far enough apart that the responses
// do not overlap. The decimated outputs give the even and the odd taps of the
// full-rate impulse responses h0 and h1. Their magnitude responses are then
// evaluated on 512 frequencies and compared with the design targets:
//   H0: stopband (w >= 0.6 pi) at most -39.0 dB, 0 dB at w = 0;
//   H1: stopband (w <= 0.4 pi) at most -39.4 dB, 0 dB at w = pi.
// The published design reaches -39.08 dB and -39.48 dB.
module tb_fb_freq_response;

  localparam int NS  = 400;
  localparam int IMP0 = 0;      // even impulse position
  localparam int IMP1 = 201;    // odd impulse position
  localparam int HL  = 64;      // taps kept of each impulse response
  localparam int NW  = 512;

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

  real h0 [HL];
  real h1 [HL];
  int  m_out = 0;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // y(m) = sum_i h[i] x(2m - i): an impulse at p gives h[2m - p].
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      int i;
      i = 2 * m_out - IMP0;
      if (i >= 0 && i < HL) begin
        h0[i] = real'(y0) / 65536.0 * 128.0 / 127.0;
        h1[i] = real'(y1) / 524288.0 * 128.0 / 127.0;
      end
      i = 2 * m_out - IMP1;
      if (i >= 0 && i < HL) begin
        h0[i] = real'(y0) / 65536.0 * 128.0 / 127.0;
        h1[i] = real'(y1) / 524288.0 * 128.0 / 127.0;
      end
      m_out++;
    end
  end

  function automatic real mag_db(input real h [HL], input real w);
    real re, im;
    re = 0.0; im = 0.0;
    for (int i = 0; i < HL; i++) begin
      re += h[i] * $cos(w * i);
      im -= h[i] * $sin(w * i);
    end
    return 10.0 * $log10(re * re + im * im + 1.0e-30);
  endfunction

  initial begin
    real pi, w, a, s0max, s1max, dc0, ny1;
    pi = 3.14159265358979;
    for (int i = 0; i < HL; i++) begin h0[i] = 0.0; h1[i] = 0.0; end
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int n = 0; n < NS; n++) begin
      in_valid = 1'b1;
      x = (n == IMP0 || n == IMP1) ? 8'sd127 : 8'sd0;
      @(posedge clk);
      #1;
    end
    in_valid = 1'b0;
    repeat (10) @(posedge clk);
    s0max = -400.0; s1max = -400.0;
    for (int k = 0; k <= NW; k++) begin
      w = pi * real'(k) / real'(NW);
      if (w >= 0.6 * pi - 1.0e-9) begin
        a = mag_db(h0, w);
        if (a > s0max) s0max = a;
      end
      if (w <= 0.4 * pi + 1.0e-9) begin
        a = mag_db(h1, w);
        if (a > s1max) s1max = a;
      end
    end
    dc0 = mag_db(h0, 0.0);
    ny1 = mag_db(h1, pi);
    $display("H0: stopband peak %0.3f dB, gain at w=0 %0.3f dB", s0max, dc0);
    $display("H1: stopband peak %0.3f dB, gain at w=pi %0.3f dB", s1max, ny1);
    check("pairs produced", m_out == NS / 2);
    check("H0 stopband <= -39.0 dB", s0max <= -39.0);
    check("H1 stopband <= -39.4 dB", s1max <= -39.4);
    check("H0 passband gain 0 dB", dc0 > -0.5 && dc0 < 0.5);
    check("H1 passband gain near 0 dB", ny1 > -1.0 && ny1 < 1.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
