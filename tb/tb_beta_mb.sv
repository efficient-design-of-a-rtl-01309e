// Self-checking testbench of beta_mb: every 8-bit input is applied and each
// of the 13 products is compared with x times the coefficient rebuilt from
// its power-of-two terms (products have 15 fractional bits, coefficients 16).
module tb_beta_mb;
  `include "fb_ref.svh"

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [7:0]  x;
  logic signed [15:0] p [13];

  beta_mb dut (.x(x), .p(p));

  initial begin
    for (int v = -128; v < 128; v++) begin
      x = 8'(v);
      #1;
      for (int n = 0; n < TB_NB; n++) begin
        longint exp_p;
        exp_p = (longint'(v) * tb_beta_c16(n)) >>> 8;  // 2^-7 * 2^-16 -> 2^-15
        checks++;
        if (longint'(p[n]) != exp_p) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d n=%0d got %0d expected %0d", v, n, p[n], exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
