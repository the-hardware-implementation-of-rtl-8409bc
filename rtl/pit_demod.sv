// pit_demod: noncoherent demodulator of signals phase-shift keyed in toto.
//
// The transmitter sends one of M code words; a word is K elements of N
// carrier periods each, every element a carrier at phase 0 or 180 degrees
// according to a_mk = +1 or -1, the whole word at one unknown carrier phase.
// The receiver decides on the whole word at once. The basic algorithm gives
// y0, y1 per period; the computing units CU0 and CU1 (code_correlator) form
// u0_m and u1_m for every word; magnitude_unit forms z_m = sqrt(u0_m^2 +
// u1_m^2), which does not depend on the carrier phase; the maximum choice
// device picks the word with the largest z_m.
// Elements are indexed so that k = 0 is the latest: a word is sent from
// element K-1 down to element 0. Word timing is not given by the published description:
// a decision is produced every period (word_valid), and word_end marks the
// periods K*N-1, 2K*N-1, ... after reset, where the stored responses span one
// whole word if words start at reset.
// Timing: word_valid 2 clocks after the basic processor's y_valid.
// The default is the Walsh configuration the published design evaluates (M = 4, N = 64,
// R = 12); K = 4 follows from the four Walsh words.
module pit_demod
  import demod_pkg::*;
#(
  parameter int unsigned R    = 12,
  parameter int unsigned N    = 64,
  parameter int unsigned M    = 4,
  parameter int unsigned K    = 4,
  parameter code_kind_e  CODE = WALSH
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [R-1:0]   adc,
  output logic [$clog2(M)-1:0]  word,
  output logic                  word_valid,
  output logic                  word_end,
  output logic [R+$clog2(N)+$clog2(K):0] word_resp   // z of the chosen word
);
  localparam int unsigned YW = R + $clog2(N) + 1;
  localparam int unsigned UW = YW + $clog2(K);
  localparam int unsigned CW = $clog2(K * N);

  logic signed [YW-1:0] y0, y1;
  logic                 y_valid;
  logic signed [UW-1:0] u0 [M];
  logic signed [UW-1:0] u1 [M];
  logic                 u_valid, u1_valid;
  logic [UW-1:0]        z [M];
  logic [CW-1:0]        per_cnt;
  logic                 eu, ez;

  basic_processor #(.R(R), .N(N)) u_basic (
    .clk, .rst_n, .adc, .y0, .y1, .y_valid
  );

  code_correlator #(.W(YW), .N(N), .K(K), .M(M), .CODE(CODE)) u_cu0 (
    .clk, .rst_n, .y(y0), .y_valid, .u(u0), .u_valid
  );
  code_correlator #(.W(YW), .N(N), .K(K), .M(M), .CODE(CODE)) u_cu1 (
    .clk, .rst_n, .y(y1), .y_valid, .u(u1), .u_valid(u1_valid)
  );

  for (genvar m = 0; m < M; m++) begin : g_mag
    magnitude_unit #(.W(UW)) u_mag (.u0(u0[m]), .u1(u1[m]), .z(z[m]));
  end

  max_choice #(.W(UW), .M(M)) u_mcd (
    .clk, .rst_n, .z, .z_valid(u_valid), .idx(word), .zmax(word_resp), .idx_valid(word_valid)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      per_cnt  <= '0;
      eu       <= 1'b0;
      ez       <= 1'b0;
    end else begin
      if (y_valid) begin
        per_cnt <= (per_cnt == CW'(K * N - 1)) ? '0 : per_cnt + 1'b1;
        eu      <= (per_cnt == CW'(K * N - 1));
      end
      if (u_valid) ez <= eu;
      else         ez <= 1'b0;
    end
  end

  assign word_end = ez;

  a_lockstep : assert property (@(posedge clk) disable iff (!rst_n) u_valid == u1_valid);
endmodule
