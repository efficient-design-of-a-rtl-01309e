// Self-checking testbench of q_round, the Q{.} round-off operator.
//
// Three instances are swept exhaustively over their input range and compared
// with a real-valued reference, floor(v * 2^OF + 0.5):
//   - default 16-bit <1|15> input rounded to 13 fractional bits,
//   - the x[n]h[0] product of the two-tap example, <1|16> rounded to <1|14>,
//   - a re-alignment (OF > IF), which must be exact.
// A watchdog ends the run if it takes too many clock cycles.
module tb_q_round;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic signed [15:0] a_in;  logic signed [14:0] a_out;
  logic signed [16:0] b_in;  logic signed [15:0] b_out;
  logic signed [7:0]  c_in;  logic signed [11:0] c_out;

  q_round #(.IW(16), .IF(15), .OF(13), .OW(15)) u_a (.din(a_in), .dout(a_out));
  q_round #(.IW(17), .IF(16), .OF(14), .OW(16)) u_b (.din(b_in), .dout(b_out));
  q_round #(.IW(8),  .IF(7),  .OF(11), .OW(12)) u_c (.din(c_in), .dout(c_out));

  function automatic longint ref_round(input longint v, input int inf, input int outf);
    real r;
    r = real'(v) / (2.0 ** inf) * (2.0 ** outf);
    return longint'($floor(r + 0.5));
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    for (int v = -32768; v < 32768; v++) begin
      a_in = 16'(v);
      #1;
      check("16b->13f", longint'(a_out), ref_round(longint'(v), 15, 13));
    end
    for (int v = -65536; v < 65536; v += 3) begin
      b_in = 17'(v);
      #1;
      check("<1|16>-><1|14>", longint'(b_out), ref_round(longint'(v), 16, 14));
    end
    for (int v = -128; v < 128; v++) begin
      c_in = 8'(v);
      #1;
      check("align", longint'(c_out), longint'(v) * 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
