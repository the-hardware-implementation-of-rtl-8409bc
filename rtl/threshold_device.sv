// threshold_device: threshold device TD of the QAM demodulator (one per
// quadrature channel).
//
// A square QAM signal with L amplitude levels per axis places the channel
// response at (2l - L + 1)*A, l = 0..L-1. The device compares the response y
// with the L-1 thresholds j*unit, j = -(L/2-1) .. L/2-1, where unit = 2A comes
// from the normalizing and synchronizing device, and outputs the number of
// thresholds at or below y: the level index l (0 = most negative).
// Combinational. The placement of the thresholds midway between levels is
// this design's choice; the published description only names the device.
module threshold_device #(
  parameter int unsigned W = 19,               // response width
  parameter int unsigned L = 2                 // levels per axis, power of 2
) (
  input  logic signed [W-1:0]          y,
  input  logic        [W-1:0]          unit,   // threshold spacing 2A, >= 0
  output logic        [$clog2(L)-1:0]  level
);
  localparam int unsigned LB = $clog2(L);
  localparam int unsigned TW = W + LB + 2;     // room for j*unit

  always_comb begin
    logic signed [TW-1:0] thr;
    level = '0;
    for (int j = 1 - int'(L / 2); j <= int'(L / 2) - 1; j++) begin
      thr = TW'(j) * $signed(TW'(unit));
      if (TW'(y) >= thr) level = level + 1'b1;
    end
  end
endmodule
