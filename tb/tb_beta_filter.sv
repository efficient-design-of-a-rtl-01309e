// Self-checking testbench of beta_filter (the beta(z) branch). A stream of
// random 8-bit samples, with stretches of worst-case samples that drive the
// output to its L1 bound in both directions, is applied with a random sample
// enable. The output must equal the exact convolution
//   y(m) = sum_n beta[n] x(m-n)       (15 fractional bits)
// computed from the coefficients' power-of-two terms. The run also counts
// how often the output needs its third integer bit (|y| >= 2).
module tb_beta_filter;
  `include "fb_ref.svh"

  int checks = 0;
  int failures = 0;
  int big = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n, en;
  logic signed [7:0] x;
  logic signed [17:0] y;

  beta_filter dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));

  longint hist [$];

  function automatic int sgn_c(input int n);
    return (tb_beta_c16(n) < 0) ? -1 : 1;
  endfunction

  initial begin
    int step;
    rst_n = 1'b0; en = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    step = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      longint exp_y, xv;
      en = ($urandom_range(0, 3) != 0);
      if (cyc >= 2000 && cyc < 4000) begin
        // worst case: x(s) = +/-sign(beta[L - (s mod (L+1))]), full scale
        int ph;
        ph = step % TB_NB;
        if (cyc < 3000) xv = (sgn_c(TB_NB - 1 - ph) > 0) ? -128 : 127;
        else            xv = (sgn_c(TB_NB - 1 - ph) > 0) ? 127 : -128;
      end else begin
        xv = longint'($urandom_range(0, 255)) - 128;
      end
      x = 8'(xv);
      #1;
      exp_y = xv * tb_beta_c16(0);
      for (int n = 1; n < TB_NB; n++)
        if (hist.size() >= n) exp_y += hist[hist.size() - n] * tb_beta_c16(n);
      exp_y = exp_y >>> 8;   // 2^-23 -> 2^-15
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d got %0d expected %0d", cyc, y, exp_y);
      end
      if (en && (exp_y >= 65536 || exp_y < -65536)) big++;
      @(posedge clk);
      if (en) begin
        hist.push_back(xv);
        step++;
      end
      #1;
    end
    checks++;
    if (big == 0) begin
      failures++;
      $display("FAIL the worst-case stretch never reached |y| >= 2");
    end
    $display("outputs with |y| >= 2: %0d", big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
