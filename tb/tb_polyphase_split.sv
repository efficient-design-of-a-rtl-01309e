// Self-checking testbench of polyphase_split. A random sample stream with
// random gaps is applied; every pair must appear on the edge that accepts an
// even-numbered sample x(2m), carrying xe = x(2m) and xo = x(2m-1) (zero for
// m = 0), and no pair may appear otherwise. A reset in the middle of the run
// must restart the numbering at x(0).
module tb_polyphase_split;

  int checks = 0;
  int failures = 0;
  int pairs = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n;
  logic              in_valid;
  logic signed [7:0] x;
  logic              pair_valid;
  logic signed [7:0] xe, xo;

  polyphase_split #(.W(8)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x(x),
    .pair_valid(pair_valid), .xe(xe), .xo(xo)
  );

  logic signed [7:0] stream [$];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(input int cycles);
    logic exp_pair;
    int   n;
    for (int c = 0; c < cycles; c++) begin
      in_valid = ($urandom_range(0, 2) != 0);
      x        = 8'($urandom);
      @(posedge clk);
      exp_pair = 1'b0;
      if (in_valid) begin
        stream.push_back(x);
        n = stream.size() - 1;
        exp_pair = (n % 2 == 0);
      end
      #1;
      check("pair_valid", int'(pair_valid), int'(exp_pair));
      if (exp_pair) begin
        pairs++;
        check("xe", int'(xe), int'(stream[n]));
        check("xo", int'(xo), (n == 0) ? 0 : int'(stream[n-1]));
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    run(1001);
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    stream.delete();
    run(1000);
    checks++;
    if (pairs < 500) failures++;
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
