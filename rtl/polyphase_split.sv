// Input stage of the analysis bank: the two decimators of the polyphase
// split, "down-sample by 2" on the upper branch and "delay by one, then
// down-sample by 2" on the lower branch.
//
// x(n) arrives one sample per cycle with in_valid high (gaps allowed). The
// first sample after reset is x(0). On every even-numbered sample x(2m) the
// stage issues one pair: xe = x(2m) and xo = x(2m-1), the sample before it
// (zero for m = 0), with pair_valid high for one cycle. Both outputs are
// registered, so a pair appears on the clock edge that accepts x(2m).
// Odd samples are only held. rst_n is asynchronous and active low.
// The two decimating branches are those of the filter-bank structure; the
// valid handshake, the hold register and the reset are this design's own.
module polyphase_split #(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x,
  output logic                pair_valid,
  output logic signed [W-1:0] xe,
  output logic signed [W-1:0] xo
);

  logic                odd_phase;  // next sample has an odd index
  logic signed [W-1:0] held;       // last accepted sample

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_phase  <= 1'b0;
      held       <= '0;
      pair_valid <= 1'b0;
      xe         <= '0;
      xo         <= '0;
    end else begin
      pair_valid <= 1'b0;
      if (in_valid) begin
        held      <= x;
        odd_phase <= ~odd_phase;
        if (!odd_phase) begin
          pair_valid <= 1'b1;
          xe         <= x;
          xo         <= held;
        end
      end
    end
  end

endmodule
