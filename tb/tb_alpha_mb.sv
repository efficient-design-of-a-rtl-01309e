// Self-checking testbench of alpha_mb: the two extreme 18-bit inputs, small
// values and 20000 random ones are applied; each of the 15 products (25
// fractional bits) is compared with y times the coefficient rebuilt from its
// power-of-two terms.
module tb_alpha_mb;
  `include "fb_ref.svh"

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [17:0] y;
  logic signed [26:0] p [15];

  alpha_mb dut (.y(y), .p(p));

  task automatic apply(input int v);
    y = 18'(v);
    #1;
    for (int n = 0; n < TB_NA; n++) begin
      longint exp_p;
      exp_p = (longint'(y) * tb_alpha_c16(n)) >>> 7;  // 2^-16 * 2^-16 -> 2^-25
      checks++;
      if (longint'(p[n]) != exp_p) begin
        failures++;
        if (failures < 10) $display("FAIL y=%0d n=%0d got %0d expected %0d", y, n, p[n], exp_p);
      end
    end
  endtask

  initial begin
    apply(-131072);
    apply(131071);
    for (int v = -300; v <= 300; v++) apply(v);
    for (int i = 0; i < 20000; i++) apply(int'($urandom_range(0, 262143)) - 131072);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
