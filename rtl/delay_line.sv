// Sample delay z^-D of a polyphase branch (the z^-N and z^-M boxes of the
// analysis bank).
//
// A shift register of D words that moves one place on each clock edge with
// en high. dout is the word that entered D enabled edges earlier, so while
// sample m is on din, dout shows sample m-D. D = 0 gives a plain wire.
// rst_n (asynchronous, active low) fills the line with zeros, which stand
// for the samples before the first one. The delay values are the filter
// bank's; the enable and reset are this design's choices.
module delay_line #(
  parameter int unsigned W = 8,
  parameter int unsigned D = 3
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);

  if (D == 0) begin : g_wire
    assign dout = din;
  end else begin : g_sr
    logic signed [W-1:0] sr [D];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(D); i++) sr[i] <= '0;
      end else if (en) begin
        sr[0] <= din;
        for (int i = 1; i < int'(D); i++) sr[i] <= sr[i-1];
      end
    end

    assign dout = sr[D-1];
  end

endmodule
