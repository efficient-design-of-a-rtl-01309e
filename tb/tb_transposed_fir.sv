// Self-checking testbench of transposed_fir at a small size: 4 taps, 12-bit
// products with 10 fractional bits (values in [-1, 1)), tap word lengths of
// 8, 10, 9 and 7 fractional bits and a 10-bit chain fraction. Random product
// vectors are applied with a random sample enable; the expected output is
//   y(m) = sum_k Q_k{ p_k(m-k) }
// with Q_k rounding to nearest, computed from the history of applied
// vectors. Register widths follow the L1 bound of the partial sums.
module tb_transposed_fir;
  `include "fb_ref.svh"

  localparam int unsigned NT = 4;
  localparam int unsigned PWLF [NT] = '{8, 10, 9, 7};
  localparam int unsigned RINT [NT] = '{4, 3, 3, 2};

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst_n, en;
  logic signed [11:0] p [NT];
  logic signed [13:0] y;

  transposed_fir #(
    .NTAPS(NT), .PW(12), .PF(10), .RF(10), .OW(14),
    .PWL_FRAC(PWLF), .REG_INT(RINT)
  ) dut (.clk(clk), .rst_n(rst_n), .en(en), .p(p), .y(y));

  typedef longint vec_t [NT];
  vec_t hist [$];   // product vectors of enabled steps, newest last

  initial begin
    rst_n = 1'b0; en = 1'b0;
    foreach (p[k]) p[k] = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      longint exp_y;
      vec_t   v;
      en = ($urandom_range(0, 3) != 0);
      for (int k = 0; k < NT; k++) begin
        // mostly random, sometimes the extreme -1 or just under +1
        case ($urandom_range(0, 9))
          0:       v[k] = -1024;
          1:       v[k] = 1023;
          default: v[k] = longint'($urandom_range(0, 2047)) - 1024;
        endcase
        p[k] = 12'(v[k]);
      end
      #1;
      exp_y = tb_round(v[0], 10, PWLF[0]) <<< (10 - PWLF[0]);
      for (int k = 1; k < NT; k++)
        if (hist.size() >= k)
          exp_y += tb_round(hist[hist.size() - k][k], 10, PWLF[k]) <<< (10 - PWLF[k]);
      checks++;
      if (longint'(y) != exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d got %0d expected %0d", cyc, y, exp_y);
      end
      @(posedge clk);
      if (en) hist.push_back(v);
      #1;
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
