// Self-checking testbench of alpha_filter (the alpha(z) branch). Random
// 18-bit <2|16> samples, with stretches of worst-case samples that drive the
// output towards its L1 bound, are applied with a random sample enable. The
// output must equal
//   y(m) = sum_n Q_n{ alpha[n] x(m-n) }     (19 fractional bits)
// where Q_n rounds to nearest at the tap's word length. The run also checks
// that rounding really happened (the result differs from the unrounded sum)
// and that the output needed its fourth integer bit (|y| >= 4).
module tb_alpha_filter;
  `include "fb_ref.svh"

  int checks = 0;
  int failures = 0;
  int rounded = 0;
  int big = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n, en;
  logic signed [17:0] x;
  logic signed [22:0] y;

  alpha_filter dut (.clk(clk), .rst_n(rst_n), .en(en), .x(x), .y(y));

  longint hist [$];

  function automatic longint sgn_c(input int n);
    return (tb_alpha_c16(n) < 0) ? -1 : 1;
  endfunction

  initial begin
    int step;
    rst_n = 1'b0; en = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    step = 0;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      longint exp_y, xv, xs, exact;
      en = ($urandom_range(0, 3) != 0);
      if (cyc >= 2000 && cyc < 4000) begin
        int ph;
        ph = step % TB_NA;
        if (cyc < 3000) xv = (sgn_c(TB_NA - 1 - ph) > 0) ? -131072 : 131071;
        else            xv = (sgn_c(TB_NA - 1 - ph) > 0) ? 131071 : -131072;
      end else begin
        xv = longint'($urandom_range(0, 262143)) - 131072;
      end
      x = 18'(xv);
      #1;
      exp_y = 0;
      exact = 0;
      for (int n = 0; n < TB_NA; n++) begin
        xs = (n == 0) ? xv : ((hist.size() >= n) ? hist[hist.size() - n] : 0);
        // product xs * c in units 2^-32, rounded to TB_ALPHA_PWL[n] bits
        exp_y += tb_round(xs * tb_alpha_c16(n), 32, TB_ALPHA_PWL[n]) <<< (19 - TB_ALPHA_PWL[n]);
        exact += xs * tb_alpha_c16(n);
      end
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d got %0d expected %0d", cyc, y, exp_y);
      end
      if ((exp_y <<< 13) != exact) rounded++;
      if (en && (exp_y >= (longint'(4) << 19) || exp_y < -(longint'(4) << 19))) big++;
      @(posedge clk);
      if (en) begin
        hist.push_back(xv);
        step++;
      end
      #1;
    end
    checks += 2;
    if (rounded == 0) begin failures++; $display("FAIL no rounding ever happened"); end
    if (big == 0)     begin failures++; $display("FAIL the output never needed 4 integer bits"); end
    $display("rounded outputs: %0d, outputs with |y| >= 4: %0d", rounded, big);
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
