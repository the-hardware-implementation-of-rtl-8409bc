// quadratic_block: the quadratic block QT of the binary DPSK demodulator.
//
// z = a^2 + b^2, the energy of a quadrature pair. Combinational; the
// enclosing demodulator registers the result. 2W+1 bits hold the largest
// value exactly (both inputs at -2^(W-1)).
module quadratic_block #(
  parameter int unsigned W = 17
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  output logic        [2*W:0] z
);
  logic signed [2*W-1:0] aa, bb;

  always_comb begin
    aa = (2*W)'(a) * (2*W)'(a);
    bb = (2*W)'(b) * (2*W)'(b);
    z  = (2*W+1)'($unsigned(aa)) + (2*W+1)'($unsigned(bb));
  end
endmodule
