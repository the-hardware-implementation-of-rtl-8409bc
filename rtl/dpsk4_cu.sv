// dpsk4_cu: computing unit (CU) of the four-position DPSK demodulator.
//
// From the current quadrature responses (y0, y1) and those one symbol earlier
// (y0d, y1d) it forms
//   z0 = y0*y0d + y1*y1d + y1*y0d - y0*y1d
//   z1 = y0*y0d + y1*y1d - y1*y0d + y0*y1d
// i.e. the real part of the phase-difference product plus and minus its
// imaginary part. The signs of z0 and z1 give the two bits of a phase step of
// 0, 90, 180 or 270 degrees (in Gray order).
// Timing: registered, z_valid follows in_valid by one clock. Widths are exact.
module dpsk4_cu #(
  parameter int unsigned W = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [W-1:0]    y0,
  input  logic signed [W-1:0]    y1,
  input  logic signed [W-1:0]    y0d,
  input  logic signed [W-1:0]    y1d,
  input  logic                   in_valid,
  output logic signed [2*W+1:0]  z0,
  output logic signed [2*W+1:0]  z1,
  output logic                   z_valid
);
  localparam int unsigned ZW = 2 * W + 2;

  logic signed [ZW-1:0] re, im;

  always_comb begin
    re = ZW'(y0) * ZW'(y0d) + ZW'(y1) * ZW'(y1d);
    im = ZW'(y1) * ZW'(y0d) - ZW'(y0) * ZW'(y1d);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      z0      <= '0;
      z1      <= '0;
      z_valid <= 1'b0;
    end else begin
      z_valid <= in_valid;
      if (in_valid) begin
        z0 <= re + im;
        z1 <= re - im;
      end
    end
  end
endmodule
