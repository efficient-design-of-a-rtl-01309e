// Q{.} round-off operator of a transposed-form FIR tap.
//
// Takes a two's-complement value with IF fractional bits and returns it
// with OF fractional bits. When OF < IF the value is rounded to the nearest
// multiple of 2^-OF: half an output LSB is added and the dropped bits are cut
// off, so ties go towards +infinity. When OF >= IF the value is only
// re-aligned (zeros appended), which is exact. The result is written into OW
// bits; the caller sizes OW from the overflow analysis so that no significant
// bit is lost. Purely combinational.
//
// Rounding to nearest follows the filter-bank design, which models the error
// as white noise of zero mean; the tie rule is this design's own choice.
module q_round #(
  parameter int unsigned IW = 16,
  parameter int unsigned IF = 15,
  parameter int unsigned OF = 13,
  parameter int unsigned OW = 15
) (
  input  logic signed [IW-1:0] din,
  output logic signed [OW-1:0] dout
);

  // Wide enough for the re-aligned input plus a rounding carry.
  localparam int unsigned SHL = (OF > IF) ? OF - IF : 0;
  localparam int unsigned SHR = (IF > OF) ? IF - OF : 0;
  localparam int unsigned TW  = IW + SHL + 1;

  logic signed [TW-1:0] wide;
  logic signed [TW-1:0] rounded;

  always_comb begin
    wide = TW'(din) <<< SHL;
    if (SHR > 0) begin
      rounded = (wide + (TW'(1) <<< (SHR > 0 ? SHR - 1 : 0))) >>> SHR;
    end else begin
      rounded = wide;
    end
    dout = OW'(rounded);
  end

endmodule
