// basic_processor: the basic fast digital algorithm that all the demodulators
// share.
//
// The IF signal is sampled at 4*f0, four samples per carrier period. The
// four-cell shifter (ms4_shifter) collects s1..s4 of each period, the
// subtractors form s1 - s3 and s2 - s4, and one sliding_sum_tree per channel
// sums these differences over the last N periods:
//   y0_i = sum_{j=0}^{N-1} (s1 - s3)_(i-j),  y1_i = sum_{j=0}^{N-1} (s2 - s4)_(i-j)
// using log2(N) additions per channel and period. For a carrier of amplitude A
// and phase phi held over the N periods, y0 = 2NA cos(phi), y1 = -2NA sin(phi)
// (or +2NA sin(phi) when the signal is written a*cos + b*sin).
// Timing: a new (y0, y1) every 4 clocks with a one-cycle y_valid; the
// response of period i appears 2 + log2(N) clocks after its last sample.
// Period i = 0 is the first group of four samples after reset.
module basic_processor #(
  parameter int unsigned R = 12,               // ADC width
  parameter int unsigned N = 64                // periods per summation
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic signed [R-1:0]               adc,
  output logic signed [R+$clog2(N):0]       y0,
  output logic signed [R+$clog2(N):0]       y1,
  output logic                              y_valid
);
  logic signed [R-1:0] s [4];
  logic                s_valid;
  logic signed [R:0]   d0, d1;
  logic                d_valid;
  logic                y1_valid;

  ms4_shifter #(.R(R)) u_ms4 (
    .clk, .rst_n, .adc, .s, .s_valid
  );

  quad_subtractor #(.R(R)) u_sub (
    .clk, .rst_n, .s, .s_valid, .d0, .d1, .d_valid
  );

  sliding_sum_tree #(.W(R + 1), .N(N)) u_ch0 (
    .clk, .rst_n, .d(d0), .d_valid, .y(y0), .y_valid(y_valid)
  );

  sliding_sum_tree #(.W(R + 1), .N(N)) u_ch1 (
    .clk, .rst_n, .d(d1), .d_valid, .y(y1), .y_valid(y1_valid)
  );

  // Both channels run in lock step.
  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n) y_valid == y1_valid);
endmodule
