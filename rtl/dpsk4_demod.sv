// dpsk4_demod: noncoherent demodulator of four-position DPSK signals.
//
// Each symbol lasts N carrier periods; its two bits are carried by the phase
// step from the previous symbol (0, 90, 180 or 270 degrees). The basic
// algorithm gives the quadrature responses y0, y1 over the last N periods; two
// N-cell shifters keep those of one symbol earlier; the computing unit
// (dpsk4_cu) forms z0 and z1, and the comparators C1, C2 give
//   S_I0 = (z0 > 0), S_I1 = (z1 > 0),   sym = {S_I1, S_I0}.
// With the phase step dphi measured from the earlier symbol to the current
// one in the y0/y1 plane (y1 = -2NA sin(phi) for a cos-phase carrier),
// z0 ~ cos(dphi) - sin(dphi) and z1 ~ cos(dphi) + sin(dphi), so
//   dphi = 0 -> 11, 90 -> 10, 180 -> 00, 270 -> 01  ({S_I1, S_I0}),
// a Gray mapping: neighbouring steps differ in one bit.
// Timing: one decision per period, sym_valid 2 clocks after y_valid; sym_end
// marks every N-th period from reset as in dpsk2_demod. The published design does not
// mention the N-cell shifters for this demodulator, but the computing unit
// needs y(i-N), so they are taken over from the binary one; comparing with
// zero and the symbol timing are this design's choices.
module dpsk4_demod #(
  parameter int unsigned R = 8,
  parameter int unsigned N = 128
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [R-1:0] adc,
  output logic [1:0]          sym,             // {S_I1, S_I0}
  output logic                sym_valid,
  output logic                sym_end
);
  localparam int unsigned NB = $clog2(N);
  localparam int unsigned YW = R + NB + 1;

  logic signed [YW-1:0]     y0, y1;
  logic                     y_valid;
  logic [YW-1:0]            y0d, y1d;
  logic signed [2*YW+1:0]   z0, z1;
  logic                     z_valid;
  logic [NB-1:0]            per_cnt;
  logic                     ez;

  basic_processor #(.R(R), .N(N)) u_basic (
    .clk, .rst_n, .adc, .y0, .y1, .y_valid
  );

  delay_line #(.W(YW), .DEPTH(N)) u_mr0 (
    .clk, .rst_n, .en(y_valid), .din(y0), .dout(y0d)
  );
  delay_line #(.W(YW), .DEPTH(N)) u_mr1 (
    .clk, .rst_n, .en(y_valid), .din(y1), .dout(y1d)
  );

  dpsk4_cu #(.W(YW)) u_cu (
    .clk, .rst_n, .y0, .y1, .y0d($signed(y0d)), .y1d($signed(y1d)),
    .in_valid(y_valid), .z0, .z1, .z_valid
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      per_cnt   <= '0;
      ez        <= 1'b0;
      sym       <= '0;
      sym_valid <= 1'b0;
      sym_end   <= 1'b0;
    end else begin
      if (y_valid) begin
        per_cnt <= per_cnt + 1'b1;
        ez      <= (per_cnt == NB'(N - 1));
      end
      sym_valid <= z_valid;
      sym_end   <= z_valid && ez;
      if (z_valid) sym <= {z1 > 0, z0 > 0};
    end
  end
endmodule
