// dpsk2_demod: noncoherent demodulator of binary DPSK signals.
//
// A binary DPSK symbol lasts N carrier periods and carries its bit in the
// phase change (0 or 180 degrees) from the previous symbol. The basic
// algorithm (basic_processor) gives the quadrature responses y0, y1 summed
// over the last N periods. Two N-cell shifters hold the responses of one
// symbol earlier, y0(i-N) and y1(i-N). Sums and differences of current and
// delayed responses go to two quadratic blocks,
//   z0 = (y0 + y0(i-N))^2 + (y1 + y1(i-N))^2    (energy if the phase held)
//   z1 = (y0 - y0(i-N))^2 + (y1 - y1(i-N))^2    (energy if it reversed)
// a subtractor forms z0 - z1 and a comparator gives the bit: sym = 1 when
// z1 > z0, i.e. the phase reversed. The comparison does not depend on the
// carrier phase, so no carrier recovery is needed.
// Timing: one decision per carrier period, sym_valid 3 clocks after the
// basic processor's y_valid. The published description does not say how symbol timing is found;
// sym_end marks every N-th period counted from reset (periods N-1, 2N-1, ...),
// where the sums span exactly one symbol if symbols start at reset.
// Which way the comparator decides and the use of sym_end are this design's
// choices; the structure follows the published design.
module dpsk2_demod #(
  parameter int unsigned R = 8,                // ADC width
  parameter int unsigned N = 128               // periods per symbol
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [R-1:0]    adc,
  output logic                   sym,
  output logic signed [2*(R+$clog2(N)+2)+1:0] z_diff,   // z0 - z1
  output logic                   sym_valid,
  output logic                   sym_end
);
  localparam int unsigned NB = $clog2(N);
  localparam int unsigned YW = R + NB + 1;      // response width
  localparam int unsigned PW = YW + 1;          // sum / difference width
  localparam int unsigned ZW = 2 * PW + 1;      // QT output width

  logic signed [YW-1:0] y0, y1;
  logic                 y_valid;
  logic [YW-1:0]        y0d, y1d;
  logic [NB-1:0]        per_cnt;

  basic_processor #(.R(R), .N(N)) u_basic (
    .clk, .rst_n, .adc, .y0, .y1, .y_valid
  );

  delay_line #(.W(YW), .DEPTH(N)) u_mr0 (
    .clk, .rst_n, .en(y_valid), .din(y0), .dout(y0d)
  );
  delay_line #(.W(YW), .DEPTH(N)) u_mr1 (
    .clk, .rst_n, .en(y_valid), .din(y1), .dout(y1d)
  );

  // Stage A: sums and differences with the previous symbol's responses.
  logic signed [PW-1:0] p0, p1, m0, m1;
  logic                 va, ea;
  // Stage B: quadratic blocks.
  logic [ZW-1:0]        z0_c, z1_c, z0, z1;
  logic                 vb, eb;

  quadratic_block #(.W(PW)) u_qt0 (.a(p0), .b(p1), .z(z0_c));
  quadratic_block #(.W(PW)) u_qt1 (.a(m0), .b(m1), .z(z1_c));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      per_cnt <= '0;
      {p0, p1, m0, m1} <= '0;
      {z0, z1}         <= '0;
      z_diff           <= '0;
      {va, ea, vb, eb, sym, sym_valid, sym_end} <= '0;
    end else begin
      va        <= y_valid;
      vb        <= va;
      sym_valid <= vb;
      if (y_valid) begin
        per_cnt <= per_cnt + 1'b1;
        ea      <= (per_cnt == NB'(N - 1));
        p0      <= PW'(y0) + PW'($signed(y0d));
        p1      <= PW'(y1) + PW'($signed(y1d));
        m0      <= PW'(y0) - PW'($signed(y0d));
        m1      <= PW'(y1) - PW'($signed(y1d));
      end
      if (va) begin
        eb <= ea;
        z0 <= z0_c;
        z1 <= z1_c;
      end
      if (vb) begin
        sym_end <= eb;
        z_diff  <= $signed({1'b0, z0}) - $signed({1'b0, z1});
        sym     <= (z1 > z0);
      end else begin
        sym_end <= 1'b0;
      end
    end
  end
endmodule
