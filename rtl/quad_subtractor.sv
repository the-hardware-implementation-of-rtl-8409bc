// quad_subtractor: the subtractors SUB0 and SUB1 of the basic algorithm.
//
// From the four samples of a carrier period it forms the difference of the
// even-numbered pair, d0 = s1 - s3, and of the odd-numbered pair,
// d1 = s2 - s4. With four samples per period these are, up to a factor 2, the
// in-phase and quadrature components of the carrier over that period and
// feed the two quadrature channels.
// Timing: registered, d_valid follows s_valid by one clock. Widening by one
// bit keeps the difference exact.
module quad_subtractor #(
  parameter int unsigned R = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [R-1:0] s [4],
  input  logic                s_valid,
  output logic signed [R:0]   d0,              // s1 - s3
  output logic signed [R:0]   d1,              // s2 - s4
  output logic                d_valid
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      d0      <= '0;
      d1      <= '0;
      d_valid <= 1'b0;
    end else begin
      d_valid <= s_valid;
      if (s_valid) begin
        d0 <= (R+1)'(s[0]) - (R+1)'(s[2]);
        d1 <= (R+1)'(s[1]) - (R+1)'(s[3]);
      end
    end
  end
endmodule
