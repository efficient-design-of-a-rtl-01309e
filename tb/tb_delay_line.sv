// Self-checking testbench of delay_line. Instances with D = 3 (the z^-N
// delay), D = 8 (the z^-M delay) and D = 0 are fed random words with a random
// enable; a queue model gives the expected output every cycle, including the
// zeros that reset puts into the line.
module tb_delay_line;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic              rst_n;
  logic              en;
  logic signed [7:0] din;
  logic signed [7:0] d3, d8, d0;

  delay_line #(.W(8), .D(3)) u3 (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(d3));
  delay_line #(.W(8), .D(8)) u8 (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(d8));
  delay_line #(.W(8), .D(0)) u0 (.clk(clk), .rst_n(rst_n), .en(en), .din(din), .dout(d0));

  logic signed [7:0] hist [$];   // accepted words, newest last

  function automatic logic signed [7:0] past(input int d);
    if (hist.size() < d) return '0;
    return hist[hist.size() - d];
  endfunction

  task automatic check(input string what, input logic signed [7:0] got, input logic signed [7:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      en  = ($urandom_range(0, 3) != 0);
      din = 8'($urandom);
      #1;
      check("D=3", d3, past(3));
      check("D=8", d8, past(8));
      check("D=0", d0, din);
      @(posedge clk);
      if (en) hist.push_back(din);
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
