// magnitude_unit: z = sqrt(u0^2 + u1^2) for one code word of the demodulator
// of signals phase-shift keyed in toto.
//
// The response of a code word does not depend on the unknown carrier phase
// once its two quadrature correlations are combined into their length. The
// unit squares and adds them and takes the integer square root by the
// restoring digit-by-digit method (one result bit per step, most significant
// first), fully unrolled: z = floor(sqrt(u0^2 + u1^2)).
// Combinational; W result bits always suffice because u0^2 + u1^2 < 2^(2W-1).
module magnitude_unit #(
  parameter int unsigned W = 21
) (
  input  logic signed [W-1:0] u0,
  input  logic signed [W-1:0] u1,
  output logic        [W-1:0] z
);
  localparam int unsigned SW = 2 * W;

  always_comb begin
    logic [SW-1:0] rem, sq0, sq1, trial;
    logic [W-1:0]  root;
    sq0  = SW'($unsigned(SW'(u0) * SW'(u0)));
    sq1  = SW'($unsigned(SW'(u1) * SW'(u1)));
    rem  = sq0 + sq1;
    root = '0;
    for (int b = W - 1; b >= 0; b--) begin
      // try setting bit b: (root + 2^b)^2 <= value  <=>  2*root*2^b + 4^b <= rem
      trial = (SW'(root) << (b + 1)) + (SW'(1) << (2 * b));
      if (rem >= trial) begin
        rem     = rem - trial;
        root[b] = 1'b1;
      end
    end
    z = root;
  end
endmodule
